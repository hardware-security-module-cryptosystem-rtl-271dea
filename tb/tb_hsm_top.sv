// tb_hsm_top: end-to-end test of the secure SoC at its default parameters.
// Phase 1, the worked example: the master-key bytes of "Alpha" and N=13 are
// programmed and locked; the generated key encrypts "hitthetarget" into
// "hitthe" 34 3E 02 11 04 75 and decrypts it back. Phase 2, after a reset, a
// second master key drives the net into the T2/T5 conflict and a place wrap,
// and random blocks are checked against the reference model's key. The MMU is
// exercised between them. Every mechanism below is counted and must occur:
// setup writes, refused ROM writes, a start refused before the lock, key
// generation steps, conflicts, wraps, engine stalls before the key, held
// results, encryptions, decryptions, refused MMU configuration, MMU faults,
// granted privileged accesses and the MMU lock.
module tb_hsm_top;
  import pn_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        rom_wr_en = 0, rom_lock = 0;
  logic [2:0]  rom_wr_addr = 0;
  logic [7:0]  rom_wr_data = 0;
  logic        rom_locked, rom_wr_refused;
  logic        gen_start = 0, gen_busy, key_ready, gen_conflict, gen_wrapped;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [95:0] in_data = '0, out_data;
  logic        boot_verified = 0, mmu_cfg_we = 0, mmu_cfg_lock = 0;
  logic [7:0]  mmu_cfg_base = 0, mmu_cfg_limit = 0;
  logic        mmu_cfg_locked, mmu_cfg_refused;
  logic        cpu_req = 0, cpu_we = 0, cpu_priv = 0;
  logic [7:0]  cpu_addr = 0, cpu_wdata = 0, cpu_rdata;
  logic        cpu_fault;
  int checks = 0, failures = 0;

  localparam logic [95:0] PLAIN  = 96'h68_69_74_74_68_65_74_61_72_67_65_74;
  localparam logic [95:0] CIPHER = 96'h68_69_74_74_68_65_34_3E_02_11_04_75;

  typedef enum int {
    M_SETUP_WRITE, M_ROM_REFUSED, M_START_REFUSED, M_FIRE_STEP, M_CONFLICT,
    M_WRAP, M_ENGINE_STALL, M_HELD_RESULT, M_ENCRYPT, M_DECRYPT,
    M_MMU_CFG_REFUSED, M_MMU_FAULT, M_MMU_GRANT, M_MMU_LOCK, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  localparam string MECH_NAME [M_COUNT] = '{
    "setup write", "refused ROM write", "start refused before lock", "firing step",
    "T2/T5 conflict", "place wrap", "engine stall before key", "held result",
    "encryption", "decryption", "refused MMU config", "MMU fault",
    "granted privileged access", "MMU lock"};

  hsm_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (rom_wr_en && !rom_locked)   mech[M_SETUP_WRITE]++;
    if (rom_wr_refused)             mech[M_ROM_REFUSED]++;
    if (gen_start && !rom_locked)   mech[M_START_REFUSED]++;
    if (gen_busy)                   mech[M_FIRE_STEP]++;
    if (gen_conflict)               mech[M_CONFLICT]++;
    if (gen_wrapped)                mech[M_WRAP]++;
    if (in_valid && !in_ready && !key_ready) mech[M_ENGINE_STALL]++;
    if (out_valid && !out_ready)    mech[M_HELD_RESULT]++;
    if (mmu_cfg_refused)            mech[M_MMU_CFG_REFUSED]++;
    if (cpu_fault)                  mech[M_MMU_FAULT]++;
    if (cpu_req && cpu_priv && cpu_addr >= mmu_cfg_base && cpu_addr <= mmu_cfg_limit && mmu_cfg_locked)
      mech[M_MMU_GRANT]++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
  endtask

  task automatic program_rom(input marking_t m, input int n);
    for (int i = 0; i < 7; i++) begin
      rom_wr_en = 1; rom_wr_addr = 3'(i); rom_wr_data = (i < 6) ? m[i] : 8'(n);
      @(posedge clk); #1;
    end
    rom_wr_en = 0;
    rom_lock = 1; @(posedge clk); #1 rom_lock = 0;
    check(rom_locked, "ROM locked");
  endtask

  task automatic generate_key(input int n);
    int cycles;
    gen_start = 1; @(posedge clk); #1 gen_start = 0;
    cycles = 0;
    while (!key_ready && cycles < 2000) begin @(posedge clk); #1 cycles++; end
    check(cycles == n + 1, $sformatf("key generation latency %0d, expected %0d", cycles, n + 1));
  endtask

  // Send one block and wait for its result.
  task automatic crypt(input logic [95:0] d, output logic [95:0] r);
    in_valid = 1; in_data = d; out_ready = 1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
    check(out_valid, "result one cycle after the block");
    r = out_data;
    @(posedge clk); #1 out_ready = 0;
  endtask

  task automatic cpu(input logic w, input logic p, input int a, input int d, output logic [7:0] r);
    cpu_req = 1; cpu_we = w; cpu_priv = p; cpu_addr = 8'(a); cpu_wdata = 8'(d);
    @(posedge clk); #1 cpu_req = 0;
    r = cpu_rdata;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    marking_t    alpha, m2;
    logic [95:0] r, d;
    logic [63:0] k2;
    logic [7:0]  rd;
    alpha = '{8'd0, 8'd97, 8'd104, 8'd112, 8'd108, 8'd65};   // P6..P1
    do_reset();

    // ---- phase 1: the worked example ----
    gen_start = 1; @(posedge clk); #1 gen_start = 0;
    @(posedge clk); #1;
    check(!gen_busy && !key_ready, "no key generation before the ROM is locked");
    in_valid = 1; in_data = PLAIN;
    repeat (3) @(posedge clk);
    #1 check(!out_valid, "engine stalls without a key");
    in_valid = 0;
    program_rom(alpha, 13);
    rom_wr_en = 1; rom_wr_addr = 3'd0; rom_wr_data = 8'd0; @(posedge clk); #1 rom_wr_en = 0;
    @(posedge clk); #1;
    generate_key(13);
    crypt(PLAIN, r);
    mech[M_ENCRYPT]++;
    check(r === CIPHER, $sformatf("cipher text %h", r));
    crypt(r, r);
    mech[M_DECRYPT]++;
    check(r === PLAIN, $sformatf("decrypted %h", r));
    // a result held under back-pressure
    in_valid = 1; in_data = PLAIN; out_ready = 0;
    @(posedge clk); #1 in_valid = 0;
    repeat (3) @(posedge clk);
    #1 check(out_valid && out_data === CIPHER, "held result");
    out_ready = 1; @(posedge clk); #1 out_ready = 0;

    // ---- MMU ----
    mmu_cfg_we = 1; mmu_cfg_base = 8'd32; mmu_cfg_limit = 8'd47;
    @(posedge clk); #1 mmu_cfg_we = 0;
    check(mmu_cfg_refused, "MMU config refused before secure boot");
    cpu(1, 0, 5, 8'h11, rd);
    check(cpu_fault, "whole RAM protected before configuration");
    boot_verified = 1;
    mmu_cfg_we = 1; @(posedge clk); #1 mmu_cfg_we = 0;
    mmu_cfg_lock = 1; @(posedge clk); #1 mmu_cfg_lock = 0;
    check(mmu_cfg_locked, "MMU locked");
    mmu_cfg_we = 1; mmu_cfg_base = 8'd0; mmu_cfg_limit = 8'd255;
    @(posedge clk); #1 mmu_cfg_we = 0;
    check(mmu_cfg_refused, "MMU config refused after lock");
    mmu_cfg_base = 8'd32; mmu_cfg_limit = 8'd47;
    cpu(1, 1, 40, 8'hA5, rd);                check(!cpu_fault, "privileged write to the key buffer");
    cpu(0, 1, 40, 0, rd);                    check(!cpu_fault && rd === 8'hA5, "privileged read of the key buffer");
    cpu(0, 0, 40, 0, rd);                    check(cpu_fault && rd === 8'h00, "unprivileged read refused");
    cpu(1, 0, 40, 8'h00, rd);                check(cpu_fault, "unprivileged write refused");
    cpu(0, 1, 40, 0, rd);                    check(rd === 8'hA5, "buffer kept its value");
    cpu(1, 0, 100, 8'h3C, rd);               check(!cpu_fault, "unprivileged write outside the window");
    cpu(0, 0, 100, 0, rd);                   check(!cpu_fault && rd === 8'h3C, "unprivileged read outside the window");
    mech[M_MMU_LOCK] += mmu_cfg_locked ? 1 : 0;

    // ---- phase 2: conflict and wrap ----
    do_reset();
    check(!rom_locked && !key_ready, "reset clears the lock and the key");
    m2 = '{8'd0, 8'd3, 8'd255, 8'd200, 8'd1, 8'd5};   // P6..P1
    program_rom(m2, 20);
    generate_key(20);
    k2 = ref_key(ref_run(m2, 20));
    for (int i = 0; i < 50; i++) begin
      d = {$urandom, $urandom, $urandom};
      crypt(d, r);
      mech[M_ENCRYPT]++;
      check(r === (d ^ {32'h0, k2}), "random block encrypted");
      crypt(r, r);
      mech[M_DECRYPT]++;
      check(r === d, "random block decrypted");
    end

    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %s: %0d", MECH_NAME[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", MECH_NAME[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
