// secure_rom: on-chip store of the master key and of the firing count N.
//
// The store is written word by word during SoC setup through the setup port
// (wr_en, wr_addr, wr_data). Raising `lock` closes the port for good: from
// the next edge every write is refused and `wr_refused` pulses for one cycle,
// so the master key cannot be changed or overwritten once set. All words are
// read in parallel on `words`; with the default map words 0..NUM_PLACES-1 are
// the initial markings of places P1.. (master-key bytes S0..) and word
// NUM_PLACES is N.
// Timing: a write lands on the next rising edge; `locked` rises on the edge
// after `lock` is sampled high; a write in the same cycle as `lock` still lands.
// The published design (Guechi and Redjimi, 2023) gives the store's purpose
// and that the user programs the
// master key and N into it at setup; the word layout, the lock bit and
// clearing the words at power-on reset (an unprogrammed part reads as zeros)
// are choices of this implementation.
module secure_rom #(
  parameter int unsigned WORDS  = hsm_pkg::ROM_WORDS,
  parameter int unsigned DW     = hsm_pkg::PLACE_W,
  parameter int unsigned ADDR_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [ADDR_W-1:0]          wr_addr,
  input  logic [DW-1:0]              wr_data,
  input  logic                       lock,
  output logic                       locked,
  output logic                       wr_refused,
  output logic [WORDS-1:0][DW-1:0]   words
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      words      <= '0;
      locked     <= 1'b0;
      wr_refused <= 1'b0;
    end else begin
      wr_refused <= wr_en && locked;
      if (lock) locked <= 1'b1;
      if (wr_en && !locked && (int'(wr_addr) < WORDS))
        words[wr_addr] <= wr_data;
    end
  end

endmodule
