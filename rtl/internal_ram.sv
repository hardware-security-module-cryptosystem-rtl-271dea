// internal_ram: on-chip RAM of the secure SoC, where the buffers for secret
// keys and intermediate values of cryptographic operations live.
//
// A single-port synchronous RAM of DEPTH words of DW bits. A request with
// we=1 writes wdata at addr on the next edge; a request with we=0 reads addr
// and rdata shows the word from the next cycle on (it holds until the next
// read). It is reached only through the MMU (hw_mmu), which decides which
// requests pass.
// The RAM and its role are the published design's; size, word width and the
// single-port synchronous interface are choices of this implementation.
module internal_ram #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DW     = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DW-1:0]     wdata,
  output logic [DW-1:0]     rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
