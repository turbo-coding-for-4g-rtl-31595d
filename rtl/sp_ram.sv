// sp_ram: single-port storage module (one bank of a banked memory).
//
// One access per cycle, read or write. A read returns the word on the next
// clock edge ('q' is registered); a write stores 'd' and leaves 'q' alone.
// The codec uses one of these per parallel window for each of its memories
// (extrinsic/intrinsic, systematic, coded and decision memories), so that P
// windows can access P banks in the same cycle. Written as an array so that
// synthesis can map it to an SRAM macro. Single-port banks are what the
// collision-free schedule is meant to allow; the synchronous read and the
// enable/write-enable port style are this design's choice.
module sp_ram #(
  parameter int unsigned DW    = 8,    // word width
  parameter int unsigned DEPTH = 108   // number of words
) (
  input  logic                     clk,
  input  logic                     en,   // access this cycle
  input  logic                     we,   // 1: write, 0: read
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [DW-1:0]            d,
  output logic [DW-1:0]            q
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= d;
      else    q <= mem[addr];
    end
  end

endmodule
