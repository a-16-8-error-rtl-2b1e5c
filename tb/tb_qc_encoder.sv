// tb_qc_encoder: exhaustive test of the (16,8) parity generator.
// Every one of the 256 data bytes is applied; the parity must equal the XOR
// of the printed rows of P selected by the data bits. It also checks the
// distance property the code rests on: every non-zero code word [p m] has
// at least 5 ones, and some have exactly 5.
module tb_qc_encoder;
  import qc_ref_pkg::*;

  logic [7:0] m, p;
  int checks = 0, failures = 0;
  int min_w = 99;

  qc_encoder dut (.m(m), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      m = 8'(v);
      #1;
      checks++;
      if (p !== ref_encode(m)) begin
        failures++;
        $display("FAIL m=%02h p=%02h expected %02h", m, p, ref_encode(m));
      end
      if (v != 0 && popcount16({p, m}) < min_w) min_w = popcount16({p, m});
    end
    checks++;
    if (min_w != 5) begin
      failures++;
      $display("FAIL minimum code word weight %0d, expected 5", min_w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
