// heap_ram: the block-RAM bank that holds one heap's data.
//
// A single-port synchronous RAM of DEPTH words of WIDTH bits, written so that
// FPGA synthesis maps it to block RAM. A write stores wdata at addr on the
// clock edge; a read registers mem[addr] and shows it on rdata after that edge
// (one cycle of read latency, read-first on a write to the same address). The
// contents are not reset, as in a block RAM: software must write a word before
// it reads it. The heap being a group of BRAMs follows the DMM-HLS structure;
// the single port and the read latency are this design's choice.
module heap_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
