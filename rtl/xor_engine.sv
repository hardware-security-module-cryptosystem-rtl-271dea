// xor_engine: the encrypt/decrypt engine.
//
// A data block is XORed with the private key, the key aligned to the least
// significant end of the block and zero-extended: with a 96-bit block and a
// 64-bit key the first four bytes pass unchanged and the last eight are XORed
// with the key. Decryption is the same operation on the cipher block, so one
// datapath serves both directions.
// Interface: valid/ready on both sides. A block is taken when in_valid and
// in_ready are both high; in_ready is low until `key_valid` (no data passes
// before a key exists) and while an unread result is held. The result is
// registered: out_valid rises on the edge that takes the block and stays high
// until out_ready. Throughput one block per cycle, latency one cycle.
// The XOR of the data with the key, its alignment and the 96-bit block of the
// worked example follow the published design; the handshake and the register stage are
// choices of this implementation.
module xor_engine #(
  parameter int unsigned DATA_W = 96,
  parameter int unsigned KEY_W  = hsm_pkg::KEY_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KEY_W-1:0]  key,
  input  logic              key_valid,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data
);

  logic [DATA_W-1:0] key_ext;

  assign key_ext  = DATA_W'(key);
  assign in_ready = key_valid && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      out_data  <= in_data ^ key_ext;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // A result is held until it is read.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data));
  endproperty
  a_hold: assert property (p_hold);

endmodule
