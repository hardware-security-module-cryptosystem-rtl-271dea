// tb_internal_ram: self-checking test of the internal RAM: random writes and
// reads against a software copy, read data one cycle after the request and
// held until the next read.
module tb_internal_ram;
  logic       clk = 0;
  logic       req = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  internal_ram #(.DEPTH(256), .DW(8)) dut (.*);

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
    logic [7:0] last;
    @(posedge clk); #1;
    for (int a = 0; a < 256; a++) begin
      req = 1; we = 1; addr = 8'(a); wdata = 8'($urandom); model[a] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 2000; i++) begin
      req = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1) == 1;
      addr = 8'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (req && we) model[addr] = wdata;
      if (req && !we) begin
        check(rdata === model[addr], $sformatf("read %0d", addr));
        last = rdata;
      end
    end
    req = 0;
    repeat (2) @(posedge clk);
    #1 check(rdata === last, "read data held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
