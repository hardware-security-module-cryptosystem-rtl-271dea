// hw_mmu: access control in front of the internal RAM.
//
// One protected window [base, limit] of the RAM holds the secret buffers. A
// request whose address lies in the window passes only when `priv` is high
// (a secure process with the right privilege); any other request in the
// window is dropped, `fault` pulses on the next cycle and the read data of
// that cycle is forced to zero. Requests outside the window pass whatever
// their privilege.
// The window is set by the boot firmware through the config port: cfg_we
// loads base and limit only while `cfg_allow` is high (the secure boot
// loader has verified the firmware) and the MMU is not locked; cfg_lock
// locks the setting until reset. A refused config write pulses `cfg_refused`.
// Out of reset the window covers the whole RAM, so nothing secret is open
// before the firmware has configured the MMU.
// Timing: requests pass combinationally to the RAM; fault and the masked read
// data line up with the RAM's registered read data one cycle later.
// The published design (Guechi and Redjimi, 2023) gives the MMU's role
// (configured at boot, only privileged
// processes reach the buffers); the single window, the priv bit, the lock and
// the reset value are choices of this implementation.
module hw_mmu #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DW     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_allow,
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_base,
  input  logic [ADDR_W-1:0] cfg_limit,
  input  logic              cfg_lock,
  output logic              cfg_locked,
  output logic              cfg_refused,
  // requests from the processor
  input  logic              in_req,
  input  logic              in_we,
  input  logic              in_priv,
  input  logic [ADDR_W-1:0] in_addr,
  input  logic [DW-1:0]     in_wdata,
  output logic [DW-1:0]     in_rdata,
  output logic              fault,
  // to the RAM
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DW-1:0]     mem_wdata,
  input  logic [DW-1:0]     mem_rdata
);

  logic [ADDR_W-1:0] base_q, limit_q;
  logic              in_window, allowed;

  assign in_window = (in_addr >= base_q) && (in_addr <= limit_q);
  assign allowed   = !in_window || in_priv;

  assign mem_req   = in_req && allowed;
  assign mem_we    = in_we;
  assign mem_addr  = in_addr;
  assign mem_wdata = in_wdata;
  assign in_rdata  = fault ? '0 : mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q      <= '0;
      limit_q     <= '1;
      cfg_locked  <= 1'b0;
      cfg_refused <= 1'b0;
      fault       <= 1'b0;
    end else begin
      fault       <= in_req && !allowed;
      cfg_refused <= cfg_we && (cfg_locked || !cfg_allow);
      if (cfg_we && !cfg_locked && cfg_allow) begin
        base_q  <= cfg_base;
        limit_q <= cfg_limit;
      end
      if (cfg_lock && cfg_allow) cfg_locked <= 1'b1;
    end
  end

endmodule
