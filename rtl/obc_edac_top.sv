// obc_edac_top: memory error protection of the satellite on-board computer.
//
// A 32-bit CPU bus is protected by DEVICES = 2 EDAC devices of 16 bits each
// (LANES = 2 byte lanes per device, so every CPU byte is its own (16,8) code
// word). Device d handles CPU data bits [16d+15:16d] and drives its own
// SRAM bank of 2**ADDR_W words by 32 bits, the low 16 bits holding data and
// the high 16 bits parity. Storage therefore doubles, as with a (12,8)
// Hamming code stored in two bytes, but any two bit errors in a byte's
// 16-bit code word are corrected.
//
// The CPU's address goes to every bank unchanged; its Read and Write strobes
// go to every device, which turns them into the banks' enables. The whole
// path is combinational: a read returns corrected data in the same cycle the
// SRAM delivers it, and a write presents data and parity together.
// The partition into two 16-bit devices and two 1M x 32 banks is taken from
// the board the document shows; the assignment of CPU bits to devices and
// the bit layout of a bank word are this design's choice.
//
// Interface: cpu_* is the CPU bus; sram_* are per-bank arrays indexed by
// device number. err_corrected / err_uncorrectable hold one flag per CPU byte
// and are valid during a read.
module obc_edac_top
  import qc16_8_pkg::*;
#(
  parameter int unsigned ADDR_W  = 20,  // 1M words per SRAM bank
  parameter int unsigned DEVICES = 2,   // 16-bit EDAC devices
  parameter int unsigned LANES   = 2    // byte lanes per device
) (
  // CPU bus
  input  logic [ADDR_W-1:0]          cpu_addr,
  input  logic                       cpu_rd,
  input  logic                       cpu_wr,
  input  logic [16*DEVICES-1:0]      cpu_wdata,
  output logic [16*DEVICES-1:0]      cpu_rdata,
  output logic [LANES*DEVICES-1:0]   err_corrected,
  output logic [LANES*DEVICES-1:0]   err_uncorrectable,
  // SRAM banks, one per device: word = {parity[15:0], data[15:0]}
  output logic [ADDR_W-1:0]          sram_addr  [DEVICES],
  output logic                       sram_we    [DEVICES],
  output logic                       sram_oe    [DEVICES],
  output logic [16*LANES-1:0]        sram_wdata [DEVICES],
  input  logic [16*LANES-1:0]        sram_rdata [DEVICES]
);

  localparam int unsigned W = 8 * LANES;  // data bits per device

  for (genvar d = 0; d < DEVICES; d++) begin : g_dev
    assign sram_addr[d] = cpu_addr;

    edac_device #(.LANES(LANES)) u_edac (
      .rd            (cpu_rd),
      .wr            (cpu_wr),
      .cpu_wdata     (cpu_wdata[W*d +: W]),
      .cpu_rdata     (cpu_rdata[W*d +: W]),
      .corrected     (err_corrected[LANES*d +: LANES]),
      .uncorrectable (err_uncorrectable[LANES*d +: LANES]),
      .mem_we        (sram_we[d]),
      .mem_oe        (sram_oe[d]),
      .mem_wdata     (sram_wdata[d][W-1:0]),
      .mem_wparity   (sram_wdata[d][2*W-1:W]),
      .mem_rdata     (sram_rdata[d][W-1:0]),
      .mem_rparity   (sram_rdata[d][2*W-1:W])
    );
  end

endmodule
