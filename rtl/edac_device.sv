// edac_device: one flow-through EDAC device sitting between the CPU data
// bus and a memory bank, LANES bytes wide (two bytes, 16 bits, for the
// devices of the on-board computer).
//
// Each byte lane has its own (16,8) encoder and decoder. On a write the CPU
// byte goes to the data half of the memory word unaltered and its parity
// byte, p = m P, to the parity half. On a read the memory's data and parity
// halves flow through the decoder and the corrected byte goes back to the
// CPU. There is no computation, interrupt or wait state: the only control
// is the CPU's Read and Write strobes, which this device turns into the
// memory's write and output enables and into the enable of its CPU-side
// read data. Everything is combinational.
//
// Control rules (this design's choice; the document says only that a Read
// and a Write strobe are all the control that is needed):
//   mem_we = wr & ~rd, mem_oe = rd & ~wr; with both strobes high neither
//   enable is given. cpu_rdata and the status flags are zero unless a read
//   is in progress (mem_oe high).
// Status outputs, per lane, also this design's addition: corrected (non-zero
// syndrome that the table corrects or that lies in the parity byte only)
// and uncorrectable (syndrome of three or more bit errors).
//
// Memory word layout: mem_data[8k+7:8k] holds lane k's data byte and
// mem_parity[8k+7:8k] its parity byte.
module edac_device
  import qc16_8_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  // CPU side
  input  logic               rd,
  input  logic               wr,
  input  logic [8*LANES-1:0] cpu_wdata,
  output logic [8*LANES-1:0] cpu_rdata,
  output logic [LANES-1:0]   corrected,
  output logic [LANES-1:0]   uncorrectable,
  // memory side
  output logic               mem_we,
  output logic               mem_oe,
  output logic [8*LANES-1:0] mem_wdata,
  output logic [8*LANES-1:0] mem_wparity,
  input  logic [8*LANES-1:0] mem_rdata,
  input  logic [8*LANES-1:0] mem_rparity
);

  assign mem_we = wr & ~rd;
  assign mem_oe = rd & ~wr;

  // The memory is never written and read at once.
  always_comb begin
    assert final (!(mem_we && mem_oe))
      else $error("memory write and output enables both active");
  end

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    byte_t m_hat, syn;
    logic  unc;

    assign mem_wdata[8*k +: 8] = cpu_wdata[8*k +: 8];

    qc_encoder u_enc (
      .m (cpu_wdata[8*k +: 8]),
      .p (mem_wparity[8*k +: 8])
    );

    qc_decoder u_dec (
      .p_r           (mem_rparity[8*k +: 8]),
      .m_r           (mem_rdata[8*k +: 8]),
      .m_hat         (m_hat),
      .syndrome      (syn),
      .uncorrectable (unc)
    );

    assign cpu_rdata[8*k +: 8] = mem_oe ? m_hat : '0;
    assign corrected[k]        = mem_oe & (|syn) & ~unc;
    assign uncorrectable[k]    = mem_oe & unc;
  end

endmodule
