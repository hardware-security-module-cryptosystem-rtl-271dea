// tb_xor_engine: self-checking test of the encrypt/decrypt engine.
// Worked example: "hitthetarget" XOR key 64'h0000_405F_7076_6101 gives
// "hitthe" followed by 34 3E 02 11 04 75; decrypting gives the message back.
// Also: no block accepted before the key is valid, a held result under
// back-pressure, one block per cycle with a one-cycle latency, random blocks.
module tb_xor_engine;
  logic        clk = 0, rst_n = 0;
  logic [63:0] key = '0;
  logic        key_valid = 0;
  logic        in_valid = 0, in_ready;
  logic [95:0] in_data = '0;
  logic        out_valid, out_ready = 0;
  logic [95:0] out_data;
  int checks = 0, failures = 0;

  localparam logic [63:0] KEY    = 64'h0000_405F_7076_6101;
  localparam logic [95:0] PLAIN  = 96'h68_69_74_74_68_65_74_61_72_67_65_74;  // hitthetarget
  localparam logic [95:0] CIPHER = 96'h68_69_74_74_68_65_34_3E_02_11_04_75;

  xor_engine #(.DATA_W(96), .KEY_W(64)) dut (.*);

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
    logic [95:0] exp_q[$];
    logic [95:0] d;
    int          sent, got;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // no key: nothing accepted
    in_valid = 1; in_data = PLAIN;
    repeat (3) begin @(posedge clk); #1; check(!in_ready && !out_valid, "stalled without key"); end
    key = KEY; key_valid = 1;
    #1 check(in_ready, "ready with key");
    @(posedge clk); #1 in_valid = 0;
    check(out_valid && out_data === CIPHER, $sformatf("encrypt example %h", out_data));
    // back-pressure: result held, no new block taken
    in_valid = 1; in_data = CIPHER;
    #1 check(!in_ready, "not ready while holding a result");
    repeat (2) begin @(posedge clk); #1; check(out_valid && out_data === CIPHER, "held result"); end
    out_ready = 1;
    #1 check(in_ready, "ready when the result is read");
    @(posedge clk); #1 in_valid = 0;
    check(out_valid && out_data === PLAIN, $sformatf("decrypt example %h", out_data));
    @(posedge clk); #1;
    check(!out_valid, "valid drops after read");
    // streaming: one block per cycle, random back-pressure
    key = {$urandom, $urandom};
    sent = 0; got = 0;
    while (got < 300) begin
      in_valid  = (sent < 300) && ($urandom_range(0, 3) != 0);
      d         = {$urandom, $urandom, $urandom};
      in_data   = d;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(out_data === exp_q.pop_front(), "stream data");
        got++;
      end
      if (in_valid && in_ready) begin
        exp_q.push_back(d ^ {32'h0, key});
        sent++;
      end
      #1;
    end
    // full rate: with out_ready high, a block per cycle
    in_valid = 1; out_ready = 1;
    for (int i = 0; i < 10; i++) begin
      in_data = 96'(i);
      @(posedge clk); #1;
      check(out_valid && out_data === (96'(i) ^ {32'h0, key}), "one block per cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
