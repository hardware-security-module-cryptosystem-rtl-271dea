// tb_secure_rom: self-checking test of the master-key store: setup writes,
// the lock, refused writes after locking, contents unchanged by them.
module tb_secure_rom;
  logic            clk = 0, rst_n = 0;
  logic            wr_en = 0, lock = 0;
  logic [2:0]      wr_addr = 0;
  logic [7:0]      wr_data = 0;
  logic            locked, wr_refused;
  logic [6:0][7:0] words;
  logic [6:0][7:0] model = '0;
  int checks = 0, failures = 0;

  secure_rom #(.WORDS(7), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input int a, input int d);
    wr_en = 1; wr_addr = 3'(a); wr_data = 8'(d);
    @(posedge clk); #1 wr_en = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned mk[7] = '{65, 108, 112, 104, 97, 0, 13};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(words === '0 && !locked, "reset state");
    for (int i = 0; i < 7; i++) begin write(i, mk[i]); model[i] = 8'(mk[i]); end
    check(words === model, "setup writes");
    for (int i = 0; i < 20; i++) begin
      int a = $urandom_range(0, 6), d = $urandom_range(0, 255);
      write(a, d); model[a] = 8'(d);
      check(words === model, "rewrite before lock");
      check(!wr_refused, "no refusal before lock");
    end
    lock = 1; @(posedge clk); #1 lock = 0;
    check(locked, "locked");
    for (int i = 0; i < 20; i++) begin
      write($urandom_range(0, 6), $urandom_range(0, 255));
      check(wr_refused, "write refused after lock");
      check(words === model, "contents unchanged after lock");
    end
    repeat (3) @(posedge clk);
    #1 check(locked && !wr_refused, "lock stays");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
