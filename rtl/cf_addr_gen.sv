// cf_addr_gen: collision-free interleaver address generator.
//
// The block of N = P*W symbols is stored in P memory banks (one per parallel
// decoding window); linear position n lives in bank n / W at address n % W.
// The interleaved sequence is cut into P windows of W symbols that are
// processed in parallel: window k handles interleaved positions k*W .. k*W+W-1
// and, at step t, all P windows access their t-th symbol together.
//
// The permutation is the cyclic-shift construction: the block is written row
// by row in a (banks x W) matrix, read column by column, and each column is
// cyclically shifted by its own index. For window k and step t, with
// t = b*P + r (0 <= r < P):
//     bank(k, t)    = (r - k) mod P
//     address(k, t) = b*P + k
// For one t the P windows address P different banks, so the interleaved read
// (and the write back to the same places) never collides. With W = P this is
// exactly the square construction (e.g. N = 16, W = 4 gives windows
// {0,4,8,12}, {13,1,5,9}, {10,14,2,6}, {7,11,15,3}); for larger blocks the
// window length W must be a multiple of P and the pattern repeats every P
// steps in a new group of P columns. Only additions and a modulo are needed,
// so the addresses are produced on the fly, without a permutation table.
//
// The further inter-row and intra-row permutations that a production
// interleaver would add (they keep the collision-free property) are not part
// of this generator.
//
// Interface and timing: purely combinational; 't' is the common step index
// and the outputs hold the bank and the bank address of every window.
module cf_addr_gen #(
  parameter int unsigned P    = 4,     // parallel windows = memory banks
  parameter int unsigned WMAX = 108    // largest window length (multiple of P)
) (
  input  logic [$clog2(WMAX)-1:0] t,                        // step within the window
  output logic [$clog2(P)-1:0]    bank [P],                 // bank read/written by window k
  output logic [$clog2(WMAX)-1:0] addr [P]                  // address in that bank
);

  localparam int unsigned AW = $clog2(WMAX);
  localparam int unsigned BW = (P > 1) ? $clog2(P) : 1;

  int unsigned r;      // t mod P
  int unsigned base;   // (t div P) * P

  always_comb begin
    r    = int'(t) % P;
    base = int'(t) - r;
    for (int k = 0; k < P; k++) begin
      // (r - k) mod P, kept non-negative
      bank[k] = BW'((r + P - k) % P);
      addr[k] = AW'(base + k);
    end
  end

endmodule
