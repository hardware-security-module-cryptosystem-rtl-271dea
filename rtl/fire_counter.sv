// fire_counter: counts the firing steps of the Petri net.
//
// `clear` sets the count to zero; each cycle with `count_up` high adds one.
// `reached` is high while the count equals the programmed number of steps
// `n_steps` (N), so the key generator stops firing once N steps are done.
// The count saturates at 2**W-1 so that it never wraps past N.
// Timing: clear and count_up act on the next rising edge; `reached` is
// combinational from the registered count and `n_steps`.
// The published design (Guechi and Redjimi, 2023) gives the counter and its
// count-up input; its width, the
// equality compare and the saturation are choices of this implementation.
module fire_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         count_up,
  input  logic [W-1:0] n_steps,
  output logic [W-1:0] count,
  output logic         reached
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           count <= '0;
    else if (clear)                       count <= '0;
    else if (count_up && (count != '1))   count <= count + 1'b1;
  end

  assign reached = (count == n_steps);

endmodule
