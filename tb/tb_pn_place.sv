// tb_pn_place: self-checking test of one Petri-net place register: load of
// the initial marking, random add/remove steps against a software count,
// hold when idle, `marked`, and the wrap flag at the top of the range.
module tb_pn_place;
  logic       clk = 0, rst_n = 0;
  logic       load = 0, step = 0;
  logic [7:0] init = 0;
  logic [2:0] n_add = 0, n_sub = 0;
  logic [7:0] tokens;
  logic       marked, wrapped;
  int checks = 0, failures = 0;
  int model;

  pn_place #(.W(8), .CNT_W(3)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tokens === 8'd0 && !marked, "reset value");
    load = 1; init = 8'd108; @(negedge clk); load = 0;
    check(tokens === 8'd108 && marked, "load");
    model = 108;
    repeat (2) @(negedge clk);
    check(tokens === 8'd108, "hold without step");
    for (int i = 0; i < 500; i++) begin
      n_add = 3'($urandom_range(0, 2));
      n_sub = 3'($urandom_range(0, 2));
      if (model < int'(n_sub)) n_sub = 3'(model);
      step = 1;
      @(negedge clk);
      model = (model + int'(n_add) - int'(n_sub)) & 255;
      check(tokens === 8'(model), $sformatf("step %0d tokens=%0d model=%0d", i, tokens, model));
      check(marked === (model != 0), "marked");
    end
    step = 0;
    // wrap at the top of the range
    load = 1; init = 8'd254; @(negedge clk); load = 0;
    step = 1; n_add = 3'd2; n_sub = 3'd0; @(negedge clk); step = 0;
    check(tokens === 8'd0, "wrap value");
    check(wrapped === 1'b1, "wrap flag");
    @(negedge clk);
    check(wrapped === 1'b0, "wrap flag clears");
    // load wins over step
    load = 1; step = 1; n_add = 3'd1; init = 8'd7; @(negedge clk); load = 0; step = 0;
    check(tokens === 8'd7, "load priority");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
