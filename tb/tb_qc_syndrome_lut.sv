// tb_qc_syndrome_lut: exhaustive test of the syndrome look-up table.
// The testbench builds its own table from the columns of H = [I | P^T]:
// every error pattern of weight 0, 1 or 2 gives the expected e_hat (its data
// part) at its syndrome. All 256 syndromes are then applied: reachable ones
// must return that e_hat with uncorrectable low, all others uncorrectable
// high and e_hat zero. It also counts that exactly 100 syndromes give a
// non-zero correction, as the code's theory requires.
module tb_qc_syndrome_lut;
  import qc_ref_pkg::*;

  logic [7:0] s, e_hat;
  logic       unc;
  int checks = 0, failures = 0;

  logic [7:0] exp_e   [256];
  logic       exp_ok  [256];
  int         n_ok = 0, n_nonzero = 0, n_dut_nonzero = 0;

  qc_syndrome_lut dut (.s(s), .e_hat(e_hat), .uncorrectable(unc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin exp_e[i] = 8'h00; exp_ok[i] = 1'b0; end
    for (int a = 0; a < 16; a++)
      for (int b = a; b < 16; b++)
        for (int w = 0; w < 3; w++) begin
          logic [15:0] e;
          logic [7:0]  sy;
          // w=0: no error (once), w=1: bit a (once per a), w=2: bits a,b
          if (w == 0 && !(a == 0 && b == 0)) continue;
          if (w == 1 && b != a) continue;
          if (w == 2 && b == a) continue;
          e = 16'h0000;
          if (w >= 1) e[a] = 1'b1;
          if (w == 2) e[b] = 1'b1;
          sy = ref_syndrome(e);
          if (exp_ok[sy]) begin
            failures++;
            $display("FAIL two weight<=2 patterns share syndrome %02h", sy);
          end
          exp_ok[sy] = 1'b1;
          exp_e[sy]  = e[7:0];
        end
    for (int i = 0; i < 256; i++) begin
      if (exp_ok[i]) n_ok++;
      if (exp_ok[i] && exp_e[i] != 0) n_nonzero++;
    end
    for (int i = 0; i < 256; i++) begin
      s = 8'(i);
      #1;
      checks++;
      if (unc !== !exp_ok[i] || e_hat !== exp_e[i]) begin
        failures++;
        $display("FAIL s=%02h e_hat=%02h unc=%0b expected %02h %0b",
                 s, e_hat, unc, exp_e[i], !exp_ok[i]);
      end
      if (e_hat != 0) n_dut_nonzero++;
    end
    checks++;
    if (n_ok != 137 || n_nonzero != 100 || n_dut_nonzero != 100) begin
      failures++;
      $display("FAIL counts: reachable %0d, non-zero %0d, design non-zero %0d",
               n_ok, n_nonzero, n_dut_nonzero);
    end
    $display("correctable syndromes %0d, with data correction %0d", n_ok, n_dut_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
