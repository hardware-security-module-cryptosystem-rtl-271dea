// hsm_top: secure SoC of a hardware security module whose private key comes
// out of a Petri net.
//
// Data path: during setup the user writes the master-key bytes and the firing
// count N into the secure ROM and locks it. `gen_start` (honoured only once
// the ROM is locked) has the Petri-net key generator load the master-key bytes
// as its initial marking and fire N steps; its final marking is the 64-bit
// private key, which exists only in the generator's place registers, never in
// the ROM. The XOR engine then encrypts or decrypts blocks on the data port
// with that key; it accepts no block before the key is ready.
// Memory path: the processor (outside this module) reaches the internal RAM
// only through the MMU, which keeps one window of the RAM for privileged
// accesses. The MMU can be configured only while `boot_verified` is high, the
// result of the secure boot loader's firmware check (also outside).
// Interfaces: setup port (rom_*), key generation (gen_*), block port (in_* /
// out_*, valid/ready), processor memory port (cpu_*), MMU config (mmu_*).
// Timing: see the submodules; key generation takes N+1 cycles after the start
// cycle, a block takes one cycle through the engine, a RAM read one cycle.
// The blocks and how data flows between them follow the published design; the ports,
// the handshakes and the gating of gen_start on the ROM lock are choices of
// this implementation.
module hsm_top #(
  parameter int unsigned DATA_W    = 96,
  parameter int unsigned RAM_DEPTH = 256
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // setup of the secure ROM
  input  logic                              rom_wr_en,
  input  logic [hsm_pkg::ROM_ADDR_W-1:0]    rom_wr_addr,
  input  logic [hsm_pkg::PLACE_W-1:0]       rom_wr_data,
  input  logic                              rom_lock,
  output logic                              rom_locked,
  output logic                              rom_wr_refused,
  // key generation
  input  logic                              gen_start,
  output logic                              gen_busy,
  output logic                              key_ready,
  output logic                              gen_conflict,
  output logic                              gen_wrapped,
  // encrypt / decrypt block port
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic [DATA_W-1:0]                 in_data,
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic [DATA_W-1:0]                 out_data,
  // secure boot result and MMU configuration
  input  logic                              boot_verified,
  input  logic                              mmu_cfg_we,
  input  logic [$clog2(RAM_DEPTH)-1:0]      mmu_cfg_base,
  input  logic [$clog2(RAM_DEPTH)-1:0]      mmu_cfg_limit,
  input  logic                              mmu_cfg_lock,
  output logic                              mmu_cfg_locked,
  output logic                              mmu_cfg_refused,
  // processor memory port
  input  logic                              cpu_req,
  input  logic                              cpu_we,
  input  logic                              cpu_priv,
  input  logic [$clog2(RAM_DEPTH)-1:0]      cpu_addr,
  input  logic [7:0]                        cpu_wdata,
  output logic [7:0]                        cpu_rdata,
  output logic                              cpu_fault
);

  localparam int unsigned NP     = hsm_pkg::NUM_PLACES;
  localparam int unsigned PW     = hsm_pkg::PLACE_W;
  localparam int unsigned RAM_AW = $clog2(RAM_DEPTH);

  logic [hsm_pkg::ROM_WORDS-1:0][PW-1:0] rom_words;
  logic [NP-1:0][PW-1:0]                 init_marking;
  logic [hsm_pkg::KEY_W-1:0]             key;

  secure_rom u_rom (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (rom_wr_en),
    .wr_addr    (rom_wr_addr),
    .wr_data    (rom_wr_data),
    .lock       (rom_lock),
    .locked     (rom_locked),
    .wr_refused (rom_wr_refused),
    .words      (rom_words)
  );

  assign init_marking = rom_words[NP-1:0];

  petri_keygen u_keygen (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (gen_start && rom_locked),
    .init_marking (init_marking),
    .n_steps      (hsm_pkg::COUNT_W'(rom_words[hsm_pkg::ROM_N_ADDR])),
    .busy         (gen_busy),
    .done         (key_ready),
    .key          (key),
    .marking      (),
    .fired        (),
    .conflict     (gen_conflict),
    .wrapped      (gen_wrapped)
  );

  xor_engine #(.DATA_W(DATA_W)) u_engine (
    .clk       (clk),
    .rst_n     (rst_n),
    .key       (key),
    .key_valid (key_ready),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_data  (out_data)
  );

  logic              ram_req, ram_we;
  logic [RAM_AW-1:0] ram_addr;
  logic [7:0]        ram_wdata, ram_rdata;

  hw_mmu #(.ADDR_W(RAM_AW), .DW(8)) u_mmu (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_allow   (boot_verified),
    .cfg_we      (mmu_cfg_we),
    .cfg_base    (mmu_cfg_base),
    .cfg_limit   (mmu_cfg_limit),
    .cfg_lock    (mmu_cfg_lock),
    .cfg_locked  (mmu_cfg_locked),
    .cfg_refused (mmu_cfg_refused),
    .in_req      (cpu_req),
    .in_we       (cpu_we),
    .in_priv     (cpu_priv),
    .in_addr     (cpu_addr),
    .in_wdata    (cpu_wdata),
    .in_rdata    (cpu_rdata),
    .fault       (cpu_fault),
    .mem_req     (ram_req),
    .mem_we      (ram_we),
    .mem_addr    (ram_addr),
    .mem_wdata   (ram_wdata),
    .mem_rdata   (ram_rdata)
  );

  internal_ram #(.DEPTH(RAM_DEPTH), .DW(8)) u_ram (
    .clk   (clk),
    .req   (ram_req),
    .we    (ram_we),
    .addr  (ram_addr),
    .wdata (ram_wdata),
    .rdata (ram_rdata)
  );

endmodule
