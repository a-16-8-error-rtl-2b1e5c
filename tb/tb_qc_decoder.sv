// tb_qc_decoder: test of the flow-through decoder.
// Part 1, exhaustive: every data byte (256) is encoded by the reference
// model and hit by every error pattern of weight 0, 1 or 2 over its 16 code
// bits (137 patterns); the decoder must return the original byte, report
// the reference syndrome (non-zero exactly when the pattern is non-zero), and never raise uncorrectable.
// Part 2, random: patterns of weight 3 and 4. Where the reference model
// finds no pattern of weight <= 2 with the same syndrome, uncorrectable must
// be high and the data must pass unaltered.
module tb_qc_decoder;
  import qc_ref_pkg::*;

  logic [7:0] p_r, m_r, m_hat, syn;
  logic       unc;
  int checks = 0, failures = 0;
  logic reachable [256];
  int n_detected = 0;

  qc_decoder dut (.p_r(p_r), .m_r(m_r), .m_hat(m_hat), .syndrome(syn),
                  .uncorrectable(unc));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [7:0] m, logic [15:0] e);
    {p_r, m_r} = {ref_encode(m), m} ^ e;
    #1;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) reachable[i] = 1'b0;
    for (int a = 0; a <= 16; a++)
      for (int b = a; b <= 16; b++) begin
        logic [15:0] e;
        e = 16'h0000;
        if (a < 16) e[a] = 1'b1;
        if (b < 16) e[b] = 1'b1;
        reachable[ref_syndrome(e)] = 1'b1;
      end

    for (int v = 0; v < 256; v++)
      for (int a = 0; a <= 16; a++)
        for (int b = a; b <= 16; b++) begin
          logic [15:0] e;
          if (a == b && a < 16) continue;
          e = 16'h0000;
          if (a < 16) e[a] = 1'b1;
          if (b < 16) e[b] = 1'b1;
          apply(8'(v), e);
          checks++;
          if (m_hat !== 8'(v) || (syn != 0) !== (e != 0) || unc !== 1'b0 ||
              syn !== ref_syndrome(e)) begin
            failures++;
            if (failures < 10)
              $display("FAIL m=%02h e=%04h: m_hat=%02h unc=%0b syn=%02h",
                       v, e, m_hat, unc, syn);
          end
        end

    for (int t = 0; t < 4000; t++) begin
      logic [7:0]  m;
      logic [15:0] e;
      m = 8'($urandom);
      e = rand_pattern(3 + (t % 2));
      apply(m, e);
      checks++;
      if (unc !== !reachable[ref_syndrome(e)] || (unc && m_hat !== m_r)) begin
        failures++;
        if (failures < 10)
          $display("FAIL weight-%0d m=%02h e=%04h unc=%0b", popcount16(e), m, e, unc);
      end
      if (unc) n_detected++;
    end
    checks++;
    if (n_detected == 0) begin
      failures++;
      $display("FAIL no uncorrectable pattern detected");
    end
    $display("weight 3/4 patterns flagged uncorrectable: %0d of 4000", n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
