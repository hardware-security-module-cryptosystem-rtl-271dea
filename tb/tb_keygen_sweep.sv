// tb_keygen_sweep: key generation over the range of firing counts N = 10,
// 15, ..., 55 and master keys of 1 to 6 bytes (the lengths the six 8-bit
// places can take), through the whole secure SoC at its default parameters.
// For each run it checks the key against the reference model, the
// generation time of N+1 cycles and one encrypt/decrypt round trip, and
// prints the cycles taken.
module tb_keygen_sweep;
  import pn_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        rom_wr_en = 0, rom_lock = 0;
  logic [2:0]  rom_wr_addr = 0;
  logic [7:0]  rom_wr_data = 0;
  logic        rom_locked, rom_wr_refused;
  logic        gen_start = 0, gen_busy, key_ready, gen_conflict, gen_wrapped;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [95:0] in_data = '0, out_data;
  logic        boot_verified = 0, mmu_cfg_we = 0, mmu_cfg_lock = 0;
  logic [7:0]  mmu_cfg_base = 0, mmu_cfg_limit = 0;
  logic        mmu_cfg_locked, mmu_cfg_refused;
  logic        cpu_req = 0, cpu_we = 0, cpu_priv = 0;
  logic [7:0]  cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_fault;
  int checks = 0, failures = 0;

  hsm_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned text[6] = '{65, 108, 112, 104, 97, 33};   // "Alpha!"
    for (int len = 1; len <= 6; len++) begin
      for (int n = 10; n <= 55; n += 5) begin
        marking_t    m0;
        logic [63:0] k;
        logic [95:0] d;
        int          cycles;
        // master key of len bytes; the remaining places start empty
        for (int p = 0; p < 6; p++) m0[p] = (p < len) ? 8'(text[p]) : 8'd0;
        rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
        for (int i = 0; i < 7; i++) begin
          rom_wr_en = 1; rom_wr_addr = 3'(i); rom_wr_data = (i < 6) ? m0[i] : 8'(n);
          @(posedge clk); #1;
        end
        rom_wr_en = 0; rom_lock = 1; @(posedge clk); #1 rom_lock = 0;
        gen_start = 1; @(posedge clk); #1 gen_start = 0;
        cycles = 0;
        while (!key_ready && cycles < 1000) begin @(posedge clk); #1 cycles++; end
        k = ref_key(ref_run(m0, n));
        check(cycles == n + 1, $sformatf("len %0d N %0d: %0d cycles", len, n, cycles));
        d = {$urandom, $urandom, $urandom};
        in_valid = 1; in_data = d; @(posedge clk); #1 in_valid = 0;
        check(out_valid && out_data === (d ^ {32'h0, k}), $sformatf("len %0d N %0d: encryption", len, n));
        in_valid = 1; in_data = out_data; @(posedge clk); #1 in_valid = 0;
        check(out_valid && out_data === d, $sformatf("len %0d N %0d: decryption", len, n));
        if (len == 5) $display("master key %0d bits, N=%0d: key %h after %0d cycles", 8 * len, n, k, cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
