// tb_fire_counter: self-checking test of the firing-step counter: clear,
// counting up to N with `reached`, hold without count_up, saturation.
module tb_fire_counter;
  logic       clk = 0, rst_n = 0;
  logic       clear = 0, count_up = 0;
  logic [7:0] n_steps = 0;
  logic [7:0] count;
  logic       reached;
  int checks = 0, failures = 0;

  fire_counter #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int steps;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      n_steps = (trial == 0) ? 8'd10 : 8'($urandom_range(0, 60));
      clear = 1; @(negedge clk); clear = 0;
      check(count === 8'd0, "clear");
      steps = 0;
      count_up = 1;
      while (!reached) begin
        @(negedge clk);
        steps++;
        if (steps > 300) break;
      end
      count_up = 0;
      check(steps == int'(n_steps), $sformatf("steps %0d to reach N=%0d", steps, n_steps));
      check(count === n_steps, "count equals N");
      @(negedge clk);
      check(count === n_steps && reached, "hold without count_up");
    end
    // saturation at the top
    n_steps = 8'd0;
    clear = 1; @(negedge clk); clear = 0;
    count_up = 1; repeat (300) @(negedge clk); count_up = 0;
    check(count === 8'hFF, "saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
