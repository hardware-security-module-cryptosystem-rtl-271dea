// tb_hw_mmu: self-checking test of the MMU in front of an internal RAM:
// whole RAM protected out of reset, configuration refused before the boot
// check, window set, privileged and unprivileged accesses in_win and outside
// the window (faults, masked read data, dropped writes), lock.
module tb_hw_mmu;
  logic       clk = 0, rst_n = 0;
  logic       cfg_allow = 0, cfg_we = 0, cfg_lock = 0;
  logic [7:0] cfg_base = 0, cfg_limit = 0;
  logic       cfg_locked, cfg_refused;
  logic       in_req = 0, in_we = 0, in_priv = 0;
  logic [7:0] in_addr = 0, in_wdata = 0, in_rdata;
  logic       fault;
  logic       mem_req, mem_we;
  logic [7:0] mem_addr, mem_wdata, mem_rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;
  int lo = 0, hi = 255;

  hw_mmu #(.ADDR_W(8), .DW(8)) dut (.*);
  internal_ram #(.DEPTH(256), .DW(8)) u_ram (
    .clk(clk), .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic w, input logic p, input int a, input int d);
    logic in_win;
    in_win = (a >= lo) && (a <= hi);
    in_req = 1; in_we = w; in_priv = p; in_addr = 8'(a); in_wdata = 8'(d);
    @(posedge clk); #1 in_req = 0;
    check(fault === (in_win && !p), $sformatf("fault a=%0d p=%0d", a, p));
    if (!in_win || p) begin
      if (w) model[a] = 8'(d);
      else   check(in_rdata === model[a], $sformatf("read a=%0d", a));
    end else if (!w) begin
      check(in_rdata === 8'h00, "denied read masked");
    end
  endtask

  task automatic do_config(input int b, input int l);
    cfg_we = 1; cfg_base = 8'(b); cfg_limit = 8'(l);
    @(posedge clk); #1 cfg_we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // privileged fill of the whole RAM (all protected out of reset)
    for (int a = 0; a < 256; a++) access(1, 1, a, $urandom_range(0, 255));
    for (int i = 0; i < 20; i++) access($urandom_range(0, 1) == 1, 0, $urandom_range(0, 255), $urandom_range(0, 255));
    // configuration before the boot check is refused
    do_config(16, 31);
    check(cfg_refused, "config refused before boot check");
    access(0, 0, 100, 0);
    cfg_allow = 1;
    do_config(16, 31); lo = 16; hi = 31;
    check(!cfg_refused, "config accepted");
    for (int i = 0; i < 400; i++)
      access($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1,
             (i % 2 == 0) ? $urandom_range(10, 40) : $urandom_range(0, 255), $urandom_range(0, 255));
    cfg_lock = 1; @(posedge clk); #1 cfg_lock = 0;
    check(cfg_locked, "locked");
    do_config(0, 0);
    check(cfg_refused, "config refused after lock");
    for (int i = 0; i < 100; i++)
      access($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1, $urandom_range(10, 40), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
