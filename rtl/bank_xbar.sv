// bank_xbar: interconnect between P decoding windows and P memory banks.
//
// Each window k names the bank it uses this cycle ('sel[k]'). On the read
// side, window k receives the word of bank sel[k]. On the write side, bank b
// receives the data of the window that selected it, with a write strobe; a
// bank nobody selected is not written. With a collision-free interleaver the
// selections form a permutation, so every bank serves exactly one window per
// cycle; an assertion flags a collision (two windows on one bank), which is
// the event the interleaver is built to avoid. 'identity' tells whether the
// routing is the straight one (window k on bank k, the linear order).
//
// The architecture only prescribes that every window reach every bank; the
// full multiplexer network and the collision flag are this design's choice.
//
// Interface and timing: purely combinational; 'check' enables the collision
// assertion (high while the selections are in use).
module bank_xbar #(
  parameter int unsigned P  = 4,    // windows = banks
  parameter int unsigned DW = 8     // data width
) (
  input  logic                   clk,      // for the collision assertion only
  input  logic                   check,
  input  logic [$clog2(P)-1:0]   sel   [P],   // bank used by window k
  // read direction: banks -> windows
  input  logic [DW-1:0]          bank_q [P],
  output logic [DW-1:0]          win_q  [P],
  // write direction: windows -> banks
  input  logic                   win_we [P],
  input  logic [DW-1:0]          win_d  [P],
  output logic                   bank_we [P],
  output logic [DW-1:0]          bank_d  [P],
  output logic                   identity,
  output logic                   collision
);

  always_comb begin
    identity  = 1'b1;
    collision = 1'b0;
    for (int k = 0; k < P; k++) begin
      win_q[k] = bank_q[sel[k]];
      if (sel[k] != ($clog2(P))'(k)) identity = 1'b0;
      for (int j = k + 1; j < P; j++)
        if (sel[j] == sel[k]) collision = 1'b1;
    end
    for (int b = 0; b < P; b++) begin
      bank_we[b] = 1'b0;
      bank_d[b]  = '0;
      for (int k = 0; k < P; k++) begin
        if (sel[k] == ($clog2(P))'(b)) begin
          bank_we[b] = bank_we[b] | win_we[k];
          bank_d[b]  = bank_d[b]  | win_d[k];
        end
      end
    end
  end

  a_no_collision: assert property (@(posedge clk) check |-> !collision)
    else $error("bank_xbar: two windows selected the same bank");

endmodule
