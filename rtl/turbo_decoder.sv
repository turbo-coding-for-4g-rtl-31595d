// turbo_decoder: iterative turbo decoder with P parallel MAP windows.
//
// The received block (N = P * L soft triples: systematic ys, C1 parity y1p,
// C2 parity y2p) is stored in P single-port banks per memory, bank b holding
// positions b*L .. b*L+L-1. P siso_window processors decode the P windows of
// the block in parallel. Each iteration has two half-iterations:
//   half 1 (decoder D1): window k reads ys, y1p and the a-priori value of
//          linear positions k*L+t from bank k, address t, and writes its
//          extrinsic value back to the same place (read linear, write linear);
//   half 2 (decoder D2): window k works on interleaved positions k*L+t. It
//          reads ys and the a-priori value of the original position pi(k*L+t)
//          (bank and address from cf_addr_gen, routed by bank_xbar), y2p from
//          bank k, and writes its extrinsic value back to the very place it
//          read the a-priori value from (read interleaved, write
//          deinterleaved).
// Because an extrinsic value always returns to the location of its own
// a-priori value, a collision-free interleaver gives a collision-free
// deinterleaver too, and one extrinsic memory serves both decoders: every
// bank is accessed by exactly one window per cycle. A single-port bank is
// enough because a half-iteration first reads (forward pass) and then
// writes (backward pass).
//
// Each extrinsic word also carries the hard decision of its position. After
// the last iteration the decisions of D2, written in deinterleaved order, are
// streamed out in natural order. Blocks are not terminated.
//
// Interface and timing: while 'in_ready' is high the decoder takes one triple
// per cycle on 'in_valid' in natural order (position j carries ys[j], y1p[j]
// and y2p[j], the C2 parity of interleaved position j); 'win_len' (L, a
// multiple of P, at most WMAX) and 'n_iter' (iterations, 0 means 1) are
// sampled with the first triple. A half-iteration takes 2L + 3 cycles (start,
// L reads, the last read's data, L write-backs, hand-over), so the first
// decided bit appears n_iter * 2 * (2L + 3) + 1 cycles after the last input;
// then 'out_valid' marks N decided bits, one per cycle, in position order
// ('out_pos'), after which the next block is accepted. 'half_done' pulses at
// the end of every half-iteration, 'xbar_perm' is high in each cycle in
// which the interleaved (non-identity) bank routing is in use, and
// 'collision' reports two windows on one bank (never expected).
//
// The banked memories, the parallel windows and the read-linear/write-linear,
// read-interleaved/write-deinterleaved schedule are the architecture being
// implemented. This design's own choices: the handshakes, the run-time
// iteration count, no overlap between loading, decoding and output, and
// taking the final decisions from the second decoder.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned P    = 4,      // parallel windows = banks per memory
  parameter int unsigned WMAX = 108     // largest window length (N = 432)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(WMAX+1)-1:0]   win_len,
  input  logic [3:0]                  n_iter,
  input  logic                        in_valid,
  input  logic signed [LLR_W-1:0]     in_ys,
  input  logic signed [LLR_W-1:0]     in_y1p,
  input  logic signed [LLR_W-1:0]     in_y2p,
  output logic                        in_ready,
  output logic                        out_valid,
  output logic                        out_bit,
  output logic [$clog2(P*WMAX)-1:0]   out_pos,
  output logic                        half_done,
  output logic                        xbar_perm,
  output logic                        collision
);

  localparam int unsigned AW = $clog2(WMAX);
  localparam int unsigned BW = $clog2(P);
  localparam int unsigned NW = $clog2(P*WMAX);
  localparam int unsigned XW = EXT_W + 1;    // extrinsic word: {hard, ext}

  typedef logic [XW-1:0]          xword_t;
  typedef logic [LLR_W-1:0]        llr_t;   // raw channel soft value

  phase_t          ph;
  logic [AW:0]     len;
  logic [3:0]      iters, it;
  logic            half;               // 0: D1 (linear), 1: D2 (interleaved)
  logic [BW-1:0]   kb;                 // bank counter (load / output)
  logic [AW-1:0]   ta;                 // address counter (load / output)
  logic [NW-1:0]   pos;
  logic [AW-1:0]   rd_t;               // read step in the forward phase
  logic            rd_q;               // read data valid (one cycle after issue)
  logic            out_q;
  logic [BW-1:0]   out_bank_q;
  logic [NW-1:0]   out_pos_q;

  // ---------------------------- windows ------------------------------------
  logic                     win_start;
  llr_t                     w_sys [P], w_par [P];
  logic signed [EXT_W-1:0]  w_apr [P];
  logic                     w_ov  [P];
  logic [AW-1:0]            w_t   [P];
  logic signed [EXT_W-1:0]  w_ext [P];
  logic                     w_hard[P];
  logic                     w_busy[P];

  // --------------------------- addressing ----------------------------------
  logic [AW-1:0]   t_cur;
  logic [BW-1:0]   pi_bank [P];
  logic [AW-1:0]   pi_addr [P];
  logic [BW-1:0]   win_bank [P], sel_q [P], xsel [P];
  logic [AW-1:0]   win_addr [P];
  logic [AW-1:0]   bank_addr [P];

  assign t_cur = (ph == PH_BWD && w_ov[0]) ? w_t[0] : rd_t;

  cf_addr_gen #(.P(P), .WMAX(WMAX)) u_pi (
    .t   (t_cur),
    .bank(pi_bank),
    .addr(pi_addr)
  );

  always_comb begin
    for (int k = 0; k < P; k++) begin
      win_bank[k] = half ? pi_bank[k] : BW'(k);
      win_addr[k] = half ? pi_addr[k] : t_cur;
    end
    for (int b = 0; b < P; b++) begin
      bank_addr[b] = '0;
      for (int k = 0; k < P; k++)
        if (win_bank[k] == BW'(b)) bank_addr[b] = win_addr[k];
    end
    for (int k = 0; k < P; k++) xsel[k] = rd_q ? sel_q[k] : win_bank[k];
  end

  // ---------------------------- memories -----------------------------------
  logic   rd_issue, wr_back, load_wr;
  assign  rd_issue = (ph == PH_FWD);
  assign  wr_back  = (ph == PH_BWD) && w_ov[0];
  assign  load_wr  = (ph == PH_LOAD) && in_valid;

  xword_t ext_q [P], ext_d [P];
  logic   ext_we [P];
  llr_t   ys_q [P], y1p_q [P], y2p_q [P];

  for (genvar b = 0; b < P; b++) begin : g_bank
    logic   sel_ld, sel_out;
    assign  sel_ld  = load_wr && (kb == BW'(b));
    assign  sel_out = (ph == PH_OUT) && (kb == BW'(b));

    sp_ram #(.DW(XW), .DEPTH(WMAX)) u_ext (
      .clk (clk),
      .en  (sel_ld || rd_issue || (wr_back && ext_we[b]) || sel_out),
      .we  (sel_ld || wr_back),
      .addr((sel_ld || sel_out) ? ta : bank_addr[b]),
      .d   (sel_ld ? xword_t'(0) : ext_d[b]),
      .q   (ext_q[b])
    );
    sp_ram #(.DW(LLR_W), .DEPTH(WMAX)) u_ys (
      .clk (clk),
      .en  (sel_ld || rd_issue),
      .we  (sel_ld),
      .addr(sel_ld ? ta : bank_addr[b]),
      .d   (in_ys),
      .q   (ys_q[b])
    );
    sp_ram #(.DW(LLR_W), .DEPTH(WMAX)) u_y1p (
      .clk (clk),
      .en  (sel_ld || (rd_issue && !half)),
      .we  (sel_ld),
      .addr(sel_ld ? ta : rd_t),
      .d   (in_y1p),
      .q   (y1p_q[b])
    );
    sp_ram #(.DW(LLR_W), .DEPTH(WMAX)) u_y2p (
      .clk (clk),
      .en  (sel_ld || (rd_issue && half)),
      .we  (sel_ld),
      .addr(sel_ld ? ta : rd_t),
      .d   (in_y2p),
      .q   (y2p_q[b])
    );
  end

  // --------------------------- interconnect --------------------------------
  xword_t w_xq [P], w_xd [P];
  llr_t   w_ysq [P];
  logic   w_we [P];
  logic   nowe [P];
  llr_t   ys_zero [P];
  llr_t   ys_dummy_d [P];
  logic   ys_dummy_we [P];
  logic   x_ident, x_coll, y_ident, y_coll;

  always_comb begin
    for (int k = 0; k < P; k++) begin
      w_we[k] = w_ov[k];
      w_xd[k] = {w_hard[k], w_ext[k]};
      nowe[k] = 1'b0;
      ys_zero[k] = '0;
    end
  end

  bank_xbar #(.P(P), .DW(XW)) u_xbar_ext (
    .clk(clk), .check(rd_q || wr_back), .sel(xsel),
    .bank_q(ext_q), .win_q(w_xq),
    .win_we(w_we), .win_d(w_xd), .bank_we(ext_we), .bank_d(ext_d),
    .identity(x_ident), .collision(x_coll)
  );

  bank_xbar #(.P(P), .DW(LLR_W)) u_xbar_ys (
    .clk(clk), .check(rd_q), .sel(sel_q),
    .bank_q(ys_q), .win_q(w_ysq),
    .win_we(nowe), .win_d(ys_zero), .bank_we(ys_dummy_we), .bank_d(ys_dummy_d),
    .identity(y_ident), .collision(y_coll)
  );

  for (genvar k = 0; k < P; k++) begin : g_win
    assign w_sys[k] = w_ysq[k];
    assign w_apr[k] = w_xq[k][EXT_W-1:0];
    assign w_par[k] = half ? y2p_q[k] : y1p_q[k];

    siso_window #(.WMAX(WMAX)) u_win (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (win_start),
      .win_len    (len[$clog2(WMAX+1)-1:0]),
      .alpha_known(k == 0),
      .in_valid   (rd_q),
      .sys        (w_sys[k]),
      .par        (w_par[k]),
      .apr        (w_apr[k]),
      .out_valid  (w_ov[k]),
      .out_t      (w_t[k]),
      .ext        (w_ext[k]),
      .hard       (w_hard[k]),
      .busy       (w_busy[k])
    );
  end

  // ---------------------------- control ------------------------------------
  assign win_start = (ph == PH_START);
  assign in_ready  = (ph == PH_LOAD);
  assign half_done = (ph == PH_BWD) && !rd_q && !w_busy[0];
  assign xbar_perm = (rd_q || wr_back) && !x_ident;
  assign collision = ((rd_q || wr_back) && x_coll) || (rd_q && y_coll);

  assign out_valid = out_q;
  assign out_bit   = ext_q[out_bank_q][XW-1];
  assign out_pos   = out_pos_q;

  logic [AW:0] ld_len;
  assign ld_len = (pos == '0) ? (AW+1)'(win_len) : len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= PH_LOAD;
      len        <= (AW+1)'(WMAX);
      iters      <= 4'd1;
      it         <= '0;
      half       <= 1'b0;
      kb         <= '0;
      ta         <= '0;
      pos        <= '0;
      rd_t       <= '0;
      rd_q       <= 1'b0;
      out_q      <= 1'b0;
      out_bank_q <= '0;
      out_pos_q  <= '0;
      for (int k = 0; k < P; k++) sel_q[k] <= '0;
    end else begin
      rd_q  <= rd_issue;
      out_q <= (ph == PH_OUT);
      out_bank_q <= kb;
      out_pos_q  <= pos;
      if (rd_issue) for (int k = 0; k < P; k++) sel_q[k] <= win_bank[k];
      case (ph)
        PH_LOAD: if (in_valid) begin
          if (pos == '0) begin
            len   <= (AW+1)'(win_len);
            iters <= (n_iter == 4'd0) ? 4'd1 : n_iter;
          end
          if ((AW+1)'(ta) == ld_len - 1'b1) begin
            ta <= '0;
            if (kb == BW'(P - 1)) begin
              kb   <= '0;
              pos  <= '0;
              it   <= '0;
              half <= 1'b0;
              ph   <= PH_START;
            end else begin
              kb  <= kb + 1'b1;
              pos <= pos + 1'b1;
            end
          end else begin
            ta  <= ta + 1'b1;
            pos <= pos + 1'b1;
          end
        end
        PH_START: begin
          rd_t <= '0;
          ph   <= PH_FWD;
        end
        PH_FWD: begin
          if ((AW+1)'(rd_t) == len - 1'b1) ph <= PH_BWD;
          else                             rd_t <= rd_t + 1'b1;
        end
        PH_BWD: if (!rd_q && !w_busy[0]) begin
          if (!half) begin
            half <= 1'b1;
            ph   <= PH_START;
          end else if (it == iters - 1'b1) begin
            half <= 1'b0;
            kb   <= '0;
            ta   <= '0;
            pos  <= '0;
            ph   <= PH_OUT;
          end else begin
            it   <= it + 1'b1;
            half <= 1'b0;
            ph   <= PH_START;
          end
        end
        PH_OUT: begin
          if ((AW+1)'(ta) == len - 1'b1) begin
            ta <= '0;
            if (kb == BW'(P - 1)) begin
              kb  <= '0;
              pos <= '0;
              ph  <= PH_LOAD;
            end else begin
              kb  <= kb + 1'b1;
              pos <= pos + 1'b1;
            end
          end else begin
            ta  <= ta + 1'b1;
            pos <= pos + 1'b1;
          end
        end
        default: ph <= PH_LOAD;
      endcase
    end
  end

endmodule
