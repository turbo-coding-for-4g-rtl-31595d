// turbo_encoder: rate-1/3 parallel concatenated convolutional (turbo) encoder.
//
// Two identical constituent encoders work in parallel: C1 encodes the
// information block in its natural order, C2 encodes the same block in the
// order of the collision-free interleaver (cf_addr_gen), which is the order
// in which the decoder's second half-iteration reads it. For every position j
// of the block the encoder puts out the systematic bit s = u[j], the C1 parity
// c1[j] and the C2 parity c2[j], where c2[j] belongs to the interleaved bit
// u[pi(j)]. Neither encoder is terminated: no tail bits follow the block.
//
// The block length is N = P * win_len, chosen per block with 'win_len'
// (a multiple of P, at most WMAX); with the defaults N = 432 bits and any
// multiple of 16 from 32 upwards can be used.
//
// Interface and timing: while 'in_ready' is high, the encoder accepts one bit
// per cycle on 'in_valid'/'in_bit' into its block buffer; 'win_len' is
// sampled with the first bit. After the N-th bit it puts out one triple per
// cycle for N cycles ('out_valid', out_s/out_c1/out_c2, position 'out_pos'
// in order) and then accepts the next block. The buffer is a register array
// organised as P banks of WMAX bits, like the decoder memories.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned P    = 4,      // parallel windows / banks
  parameter int unsigned WMAX = 108     // largest window length
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(WMAX+1)-1:0]     win_len,
  input  logic                          in_valid,
  input  logic                          in_bit,
  output logic                          in_ready,
  output logic                          out_valid,
  output logic                          out_s,
  output logic                          out_c1,
  output logic                          out_c2,
  output logic [$clog2(P*WMAX)-1:0]     out_pos
);

  localparam int unsigned AW = $clog2(WMAX);
  localparam int unsigned BW = $clog2(P);
  localparam int unsigned NW = $clog2(P*WMAX);

  typedef enum logic {E_LOAD, E_ENC} est_e;

  est_e            st;
  logic [AW:0]     len;
  logic [BW-1:0]   kb;        // bank (load) / window (encode)
  logic [AW-1:0]   ta;        // address (load) / step (encode)
  logic [NW-1:0]   pos;
  logic            ubuf [P][WMAX];

  logic [BW-1:0]   pi_bank [P];
  logic [AW-1:0]   pi_addr [P];

  cf_addr_gen #(.P(P), .WMAX(WMAX)) u_pi (
    .t   (ta),
    .bank(pi_bank),
    .addr(pi_addr)
  );

  logic u_lin, u_int, enc_en, first;
  assign u_lin   = ubuf[kb][ta];
  assign u_int   = ubuf[pi_bank[kb]][pi_addr[kb]];
  assign enc_en  = (st == E_ENC);
  assign first   = (st == E_LOAD) && (pos == '0);

  rsc_encoder u_c1 (.clk(clk), .rst_n(rst_n), .init(first), .en(enc_en),
                    .u(u_lin), .parity(out_c1), .state());
  rsc_encoder u_c2 (.clk(clk), .rst_n(rst_n), .init(first), .en(enc_en),
                    .u(u_int), .parity(out_c2), .state());

  assign in_ready  = (st == E_LOAD);
  assign out_valid = enc_en;
  assign out_s     = u_lin;
  assign out_pos   = pos;

  logic last_step;
  assign last_step = ((AW+1)'(ta) == len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= E_LOAD;
      len <= (AW+1)'(WMAX);
      kb  <= '0;
      ta  <= '0;
      pos <= '0;
    end else begin
      case (st)
        E_LOAD: if (in_valid) begin
          if (pos == '0) len <= (AW+1)'(win_len);
          if (((pos == '0) ? (AW+1)'(win_len) : len) - 1'b1 == (AW+1)'(ta)) begin
            ta <= '0;
            if (kb == BW'(P - 1)) begin
              kb  <= '0;
              pos <= '0;
              st  <= E_ENC;
            end else begin
              kb  <= kb + 1'b1;
              pos <= pos + 1'b1;
            end
          end else begin
            ta  <= ta + 1'b1;
            pos <= pos + 1'b1;
          end
        end
        E_ENC: begin
          if (last_step) begin
            ta <= '0;
            if (kb == BW'(P - 1)) begin
              kb  <= '0;
              pos <= '0;
              st  <= E_LOAD;
            end else begin
              kb  <= kb + 1'b1;
              pos <= pos + 1'b1;
            end
          end else begin
            ta  <= ta + 1'b1;
            pos <= pos + 1'b1;
          end
        end
        default: st <= E_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == E_LOAD && in_valid) ubuf[kb][ta] <= in_bit;
  end

endmodule
