// siso_window: max-log-MAP soft-in/soft-out decoder for one window.
//
// One of the P parallel window processors of the turbo decoder. It decodes a
// window of up to WMAX trellis steps of the 8-state constituent code in two
// passes, following the split into memories and data path of a windowed MAP
// decoder:
//   forward pass  - takes one step per valid input (systematic value, parity
//                   value, a-priori value), keeps the branch-metric inputs in
//                   a branch-metric memory and the forward state metrics
//                   (alpha) in a state-metric memory, and runs the alpha
//                   recursion;
//   backward pass - runs the beta recursion from the window end back to its
//                   start, one step per cycle, and at each step combines
//                   alpha, the branch metrics and beta into the a-posteriori
//                   LLR. It outputs the extrinsic value (LLR minus systematic
//                   and a-priori input) and the hard decision for that step.
// Max-log-MAP: every log-sum is replaced by a maximum. Branch metric of a
// transition with input bit u and parity bit p:
//     gamma = u*(sys + apr) + p*par
// State metrics are normalised each step by subtracting their maximum and
// are saturated to SM_W bits; the extrinsic output saturates to EXT_W bits.
//
// Window edges (this design's choice, the original window set-up is not
// published): the forward recursion starts in state 0 when 'alpha_known' is
// set (the first window of a block: the encoders start in state 0) and from
// equal metrics otherwise; the backward recursion always starts from equal
// metrics, since blocks are not terminated and window ends are unknown.
//
// Interface and timing: pulse 'start' with 'win_len' (L) and 'alpha_known'.
// Then give L inputs with 'in_valid' (gaps allowed), for t = 0 .. L-1. One
// cycle after the last input, the backward pass puts out one result per
// cycle for t = L-1 down to 0 ('out_valid', 'out_t'); 'busy' stays high
// until the last one. A window therefore takes 2L cycles; the first
// extrinsic value appears L cycles after the first input.
module siso_window
  import turbo_pkg::*;
#(
  parameter int unsigned WMAX = 108       // largest window length
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(WMAX+1)-1:0]   win_len,
  input  logic                        alpha_known,
  input  logic                        in_valid,
  input  logic signed [LLR_W-1:0]     sys,
  input  logic signed [LLR_W-1:0]     par,
  input  logic signed [EXT_W-1:0]     apr,
  output logic                        out_valid,
  output logic [$clog2(WMAX)-1:0]     out_t,
  output logic signed [EXT_W-1:0]     ext,
  output logic                        hard,
  output logic                        busy
);

  localparam int unsigned AW = $clog2(WMAX);
  localparam int unsigned LUW = (EXT_W > LLR_W ? EXT_W : LLR_W) + 1;

  typedef logic signed [SM_W-1:0] sm_t;
  typedef logic signed [19:0]     wide_t;
  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} st_e;

  st_e                  st;
  logic [AW:0]          len;
  logic [AW-1:0]        fcnt, bcnt;
  sm_t                  alpha [NSTATES];
  sm_t                  beta  [NSTATES];

  // level-2 memories of this window: branch-metric inputs and forward metrics
  logic signed [LUW-1:0]   bm_u [WMAX];
  logic signed [LLR_W-1:0] bm_p [WMAX];
  sm_t                     amem [WMAX][NSTATES];

  // ---------------- forward recursion (combinational step) ----------------
  logic signed [LUW-1:0] lu_in;
  sm_t                   alpha_nx [NSTATES];

  function automatic wide_t gamma(logic u, logic p, logic signed [LUW-1:0] lu,
                                  logic signed [LLR_W-1:0] lp);
    wide_t g;
    g = '0;
    if (u) g = g + wide_t'(lu);
    if (p) g = g + wide_t'(lp);
    return g;
  endfunction

  always_comb begin
    wide_t acc [NSTATES];
    wide_t mx;
    state_t ns;
    wide_t cand;
    lu_in = LUW'(sys) + LUW'(apr);
    for (int s = 0; s < NSTATES; s++) acc[s] = -(wide_t'(1) <<< 18);
    for (int s = 0; s < NSTATES; s++) begin
      for (int u = 0; u < 2; u++) begin
        ns   = rsc_next(state_t'(s), u[0]);
        cand = wide_t'(alpha[s]) + gamma(u[0], rsc_parity(state_t'(s), u[0]), lu_in, par);
        if (cand > acc[ns]) acc[ns] = cand;
      end
    end
    mx = acc[0];
    for (int s = 1; s < NSTATES; s++) if (acc[s] > mx) mx = acc[s];
    for (int s = 0; s < NSTATES; s++) alpha_nx[s] = sm_t'(sat16(acc[s] - mx, SM_W));
  end

  // ------------- backward recursion and soft output (combinational) -------
  logic signed [LUW-1:0]   lu_b;
  logic signed [LLR_W-1:0] lp_b;
  sm_t                     beta_nx [NSTATES];
  wide_t                   llr;

  always_comb begin
    wide_t m1, m0, cand, bcand, mx;
    wide_t bacc [NSTATES];
    state_t ns;
    logic p;
    lu_b = bm_u[bcnt];
    lp_b = bm_p[bcnt];
    m1 = -(wide_t'(1) <<< 18);
    m0 = -(wide_t'(1) <<< 18);
    for (int s = 0; s < NSTATES; s++) begin
      bacc[s] = -(wide_t'(1) <<< 18);
      for (int u = 0; u < 2; u++) begin
        ns    = rsc_next(state_t'(s), u[0]);
        p     = rsc_parity(state_t'(s), u[0]);
        bcand = gamma(u[0], p, lu_b, lp_b) + wide_t'(beta[ns]);
        cand  = wide_t'(amem[bcnt][s]) + bcand;
        if (bcand > bacc[s]) bacc[s] = bcand;
        if (u == 1) begin
          if (cand > m1) m1 = cand;
        end else begin
          if (cand > m0) m0 = cand;
        end
      end
    end
    llr = m1 - m0;
    mx = bacc[0];
    for (int s = 1; s < NSTATES; s++) if (bacc[s] > mx) mx = bacc[s];
    for (int s = 0; s < NSTATES; s++) beta_nx[s] = sm_t'(sat16(bacc[s] - mx, SM_W));
  end

  assign out_valid = (st == S_BWD);
  assign out_t     = bcnt;
  assign ext       = EXT_W'(sat16(llr - wide_t'(lu_b), EXT_W));
  assign hard      = (llr > 0);
  assign busy      = (st != S_IDLE);

  // ---------------------------- sequencing --------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      len  <= '0;
      fcnt <= '0;
      bcnt <= '0;
      for (int s = 0; s < NSTATES; s++) begin
        alpha[s] <= '0;
        beta[s]  <= '0;
      end
    end else begin
      case (st)
        S_IDLE: if (start) begin
          st   <= S_FWD;
          len  <= (AW+1)'(win_len);
          fcnt <= '0;
          for (int s = 0; s < NSTATES; s++)
            alpha[s] <= (alpha_known && s != 0) ? -(sm_t'(1) <<< (SM_W - 2)) : '0;
        end
        S_FWD: if (in_valid) begin
          for (int s = 0; s < NSTATES; s++) alpha[s] <= alpha_nx[s];
          if ((AW+1)'(fcnt) == len - 1'b1) begin
            st   <= S_BWD;
            bcnt <= fcnt;
            for (int s = 0; s < NSTATES; s++) beta[s] <= '0;
          end else begin
            fcnt <= fcnt + 1'b1;
          end
        end
        S_BWD: begin
          for (int s = 0; s < NSTATES; s++) beta[s] <= beta_nx[s];
          if (bcnt == '0) st <= S_IDLE;
          else            bcnt <= bcnt - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // memories: written during the forward pass, no reset needed
  always_ff @(posedge clk) begin
    if (st == S_FWD && in_valid) begin
      bm_u[fcnt] <= lu_in;
      bm_p[fcnt] <= par;
      for (int s = 0; s < NSTATES; s++) amem[fcnt][s] <= alpha[s];
    end
  end

endmodule
