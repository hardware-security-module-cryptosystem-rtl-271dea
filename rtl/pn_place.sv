// pn_place: one place of the hardware-wired Petri net.
//
// The place is a W-bit token-count register. `load` copies the initial
// marking `init` into it (the master-key byte of this place). On a cycle with
// `step` high the count becomes count + n_add - n_sub, where n_add is the
// number of firing transitions that output into this place and n_sub the
// number of firing transitions that take a token from it (all arcs have
// weight 1). The net computes the next marking of every place from the
// present one and all places update on the same clock edge, which is the role
// the pair of registers per place (p / p_prime) plays in the wired net.
//
// Timing: `load` and `step` take effect at the next rising clock edge; `load`
// wins over `step`. `tokens` is the registered count, `marked` is high when it
// is not zero (the enabling test of an arc of weight 1).
// Choices of this implementation: the count wraps modulo 2**W if it passes
// 2**W-1 (the register is a plain adder with no overflow detection), and
// `wrapped` pulses for one cycle after such a wrap; reset clears the count.
module pn_place #(
  parameter int unsigned W     = 8,
  parameter int unsigned CNT_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [W-1:0]     init,
  input  logic             step,
  input  logic [CNT_W-1:0] n_add,
  input  logic [CNT_W-1:0] n_sub,
  output logic [W-1:0]     tokens,
  output logic             marked,
  output logic             wrapped
);

  logic [W:0] sum_add;
  logic [W:0] next_ext;

  always_comb begin
    sum_add  = {1'b0, tokens} + (W+1)'(n_add);
    next_ext = sum_add - (W+1)'(n_sub);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tokens  <= '0;
      wrapped <= 1'b0;
    end else if (load) begin
      tokens  <= init;
      wrapped <= 1'b0;
    end else if (step) begin
      tokens  <= next_ext[W-1:0];
      wrapped <= next_ext[W];
    end else begin
      wrapped <= 1'b0;
    end
  end

  assign marked = (tokens != '0);

endmodule
