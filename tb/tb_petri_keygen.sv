// tb_petri_keygen: self-checking test of the Petri-net key generator.
// Worked example: master-key bytes 65,108,112,104,97 (P6 empty). After 13
// firing steps the marking is 64,95,112,118,97,1 and the key is
// 64'h0000_405F_7076_6101; N=10 is checked against the reference model.
// Random initial markings and N are checked against pn_ref_pkg, the latency
// of N+1 cycles is checked on every run, as are N=0, a start while busy, the
// T2/T5 conflict on a single token in P2 and the wrap of a full place.
module tb_petri_keygen;
  import pn_ref_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  start = 0;
  logic [5:0][7:0]       init_marking = '0;
  logic [7:0]            n_steps = 0;
  logic                  busy, done, conflict, wrapped;
  logic [63:0]           key;
  logic [5:0][7:0]       marking;
  logic [5:0]            fired;
  int checks = 0, failures = 0;
  int n_conflicts = 0, n_wraps = 0;

  petri_keygen dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (conflict) n_conflicts++;
    if (wrapped)  n_wraps++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Start a run and return the cycles from the start edge to `done`.
  task automatic run(input marking_t m0, input int n, output int cycles);
    init_marking = m0;
    n_steps      = 8'(n);
    start = 1;
    @(posedge clk);
    #1 start = 0;
    cycles = 0;
    while (!done && cycles < 1000) begin
      @(posedge clk);
      #1 cycles++;
    end
  endtask

  task automatic run_and_check(input marking_t m0, input int n, input string tag);
    int       cycles;
    marking_t exp;
    run(m0, n, cycles);
    exp = ref_run(m0, n);
    check(cycles == n + 1, $sformatf("%s latency %0d, expected %0d", tag, cycles, n + 1));
    check(marking === exp, $sformatf("%s marking %h expected %h", tag, marking, exp));
    check(key === ref_key(exp), $sformatf("%s key %h", tag, key));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    marking_t alpha, fig9;
    int       cycles;
    alpha = '{8'd0, 8'd97, 8'd104, 8'd112, 8'd108, 8'd65};   // P6..P1
    fig9  = '{8'd1, 8'd97, 8'd118, 8'd112, 8'd95,  8'd64};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(!busy && !done, "idle after reset");

    // Worked example
    run(alpha, 13, cycles);
    check(cycles == 14, "latency N=13");
    check(marking === fig9, $sformatf("marking after 13 steps %h", marking));
    check(key === 64'h0000_405F_7076_6101, $sformatf("example key %h", key));
    run_and_check(alpha, 10, "alpha N=10");
    check(marking[1] == 8'd98 && marking[3] == 8'd115, "alpha N=10 values");

    // N = 0: the key is the initial marking
    run_and_check(alpha, 0, "N=0");
    check(marking === alpha, "N=0 keeps the marking");

    // Start while busy is ignored
    init_marking = alpha; n_steps = 8'd20;
    start = 1; @(posedge clk); #1 start = 0;
    repeat (5) @(posedge clk);
    #1 init_marking = '0; start = 1;
    @(posedge clk); #1 start = 0;
    cycles = 6;
    while (!done && cycles < 1000) begin @(posedge clk); #1 cycles++; end
    check(cycles == 21, $sformatf("start while busy ignored, latency %0d", cycles));
    check(marking === ref_run(alpha, 20), "start while busy keeps the run");

    // Conflict: one token in P2 goes to T2 only
    run_and_check('{8'd0, 8'd0, 8'd0, 8'd0, 8'd1, 8'd0}, 1, "conflict");
    check(marking[2] == 8'd1 && marking[3] == 8'd0, "T2 served before T5");

    // Wrap of a full place
    run_and_check('{8'd0, 8'd5, 8'd250, 8'd200, 8'd200, 8'd5}, 8, "wrap");

    // Random markings and N
    for (int i = 0; i < 60; i++) begin
      marking_t m;
      for (int p = 0; p < 6; p++) m[p] = 8'($urandom_range(0, 255));
      if (i % 3 == 0) m[5] = 8'd0;
      if (i % 5 == 0) m[1] = 8'($urandom_range(0, 2));
      run_and_check(m, $urandom_range(0, 60), $sformatf("random %0d", i));
    end

    check(n_conflicts > 0, "a T2/T5 conflict occurred");
    check(n_wraps > 0, "a wrap occurred");
    $display("conflicts=%0d wraps=%0d", n_conflicts, n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
