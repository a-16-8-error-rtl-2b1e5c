// tb_obc_edac_top: end-to-end test of the protected memory of the on-board
// computer at its full size (two 1M x 32 SRAM banks, 32-bit CPU bus).
//
// The testbench plays the CPU: it writes random words to random addresses,
// lets single event upsets strike the stored words, and reads them back.
// Upsets are flipped straight into the SRAM models, in one of six kinds per
// byte lane: none, one data bit, two data bits, one data and one parity bit,
// one or two parity bits, and three bits (beyond the code). Every read is
// checked against the written word (bytes with at most two upsets must come
// back intact) and the flags against the kind of upset. Stored words are
// also checked bit-for-bit: data unaltered in the low half of a bank word,
// the reference parity in the high half. Each mechanism must occur at least
// once. Every tenth round the corrected word is written back, as scrub
// software would, and the stored words must then be clean code words.
// The bus is combinational; the clock here only paces the test and
// the SRAM models' writes.
module tb_obc_edac_top;
  import qc_ref_pkg::*;

  localparam int ADDR_W = 20;
  localparam int DEV    = 2;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] cpu_addr;
  logic              cpu_rd, cpu_wr;
  logic [31:0]       cpu_wdata, cpu_rdata;
  logic [3:0]        err_corrected, err_uncorrectable;
  logic [ADDR_W-1:0] sram_addr  [DEV];
  logic              sram_we    [DEV];
  logic              sram_oe    [DEV];
  logic [31:0]       sram_wdata [DEV];
  logic [31:0]       sram_rdata [DEV];

  int checks = 0, failures = 0;
  int n_write = 0, n_clean = 0, n_single = 0, n_double = 0, n_mixed = 0,
      n_parity = 0, n_unc = 0, n_miscorrect = 0, n_scrub = 0;
  logic [31:0] rdata_held;

  obc_edac_top dut (
    .cpu_addr(cpu_addr), .cpu_rd(cpu_rd), .cpu_wr(cpu_wr),
    .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata),
    .err_corrected(err_corrected), .err_uncorrectable(err_uncorrectable),
    .sram_addr(sram_addr), .sram_we(sram_we), .sram_oe(sram_oe),
    .sram_wdata(sram_wdata), .sram_rdata(sram_rdata));

  for (genvar d = 0; d < DEV; d++) begin : g_bank
    sram_model #(.ADDR_W(ADDR_W), .WIDTH(32)) u_sram (
      .clk(clk), .addr(sram_addr[d]), .we(sram_we[d]), .oe(sram_oe[d]),
      .wdata(sram_wdata[d]), .rdata(sram_rdata[d]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Flip code bit c (0..7 parity, 8..15 data) of byte lane `lane` (0..3) at a.
  task automatic upset(logic [ADDR_W-1:0] a, int lane, int c);
    int unsigned b;
    b = (c < 8) ? 16 + 8 * (lane % 2) + c : 8 * (lane % 2) + (c - 8);
    if (lane / 2 == 0) g_bank[0].u_sram.upset(a, b);
    else               g_bank[1].u_sram.upset(a, b);
  endtask

  function automatic logic [31:0] peek(int d, logic [ADDR_W-1:0] a);
    return (d == 0) ? g_bank[0].u_sram.peek(a) : g_bank[1].u_sram.peek(a);
  endfunction

  // Error pattern {e_p, e_m} of a given kind.
  function automatic logic [15:0] pattern(int kind);
    logic [15:0] e;
    case (kind)
      0: e = 16'h0000;
      1: e = {8'h00, 8'h01 << $urandom_range(7, 0)};
      2: begin e = 16'h0000; while (popcount16(e) < 2) e[$urandom_range(7, 0)] = 1'b1; end
      3: e = {8'h01 << $urandom_range(7, 0), 8'h01 << $urandom_range(7, 0)};
      4: begin e = 16'h0000; while (popcount16(e) < 1 + ($urandom % 2)) e[$urandom_range(15, 8)] = 1'b1; end
      default: e = rand_pattern(3);
    endcase
    return e;
  endfunction

  function automatic logic reachable(logic [7:0] s);
    for (int x = 0; x <= 16; x++)
      for (int y = x; y <= 16; y++) begin
        logic [15:0] f;
        f = 16'h0;
        if (x < 16) f[x] = 1'b1;
        if (y < 16) f[y] = 1'b1;
        if (ref_syndrome(f) == s) return 1'b1;
      end
    return 1'b0;
  endfunction

  initial begin
    cpu_addr = '0; cpu_rd = 0; cpu_wr = 0; cpu_wdata = '0;
    @(negedge clk);
    check(!sram_we[0] && !sram_oe[0] && !sram_we[1] && !sram_oe[1] && cpu_rdata == 0,
          "bus idle");

    for (int t = 0; t < 1500; t++) begin
      logic [ADDR_W-1:0] a;
      logic [31:0]       d;
      logic [15:0]       e [4];
      int                kind [4];
      a = ADDR_W'($urandom);
      d = $urandom;

      // write
      cpu_addr = a; cpu_wdata = d; cpu_wr = 1'b1;
      @(negedge clk);
      cpu_wr = 1'b0;
      n_write++;
      for (int k = 0; k < DEV; k++) begin
        logic [31:0] w;
        w = peek(k, a);
        check(w[15:0] == d[16*k +: 16], "stored data half");
        check(w[31:16] == {ref_encode(d[16*k+8 +: 8]), ref_encode(d[16*k +: 8])},
              "stored parity half");
      end

      // single event upsets
      for (int l = 0; l < 4; l++) begin
        kind[l] = (t + l) % 6;
        e[l] = pattern(kind[l]);
        for (int c = 0; c < 16; c++) if (e[l][c]) upset(a, l, (c < 8) ? c + 8 : c - 8);
      end

      // read
      cpu_rd = 1'b1;
      #1;
      check(sram_oe[0] && sram_oe[1] && !sram_we[0] && !sram_we[1], "read enables");
      for (int l = 0; l < 4; l++) begin
        logic [7:0] got, want;
        logic       can;
        got  = cpu_rdata[8*l +: 8];
        want = d[8*l +: 8];
        can  = reachable(ref_syndrome(e[l]));
        if (kind[l] < 5) begin
          check(got == want, $sformatf("read lane %0d kind %0d e=%04h", l, kind[l], e[l]));
          check(err_corrected[l] == (kind[l] != 0) && !err_uncorrectable[l],
                $sformatf("flags lane %0d kind %0d", l, kind[l]));
        end else begin
          check(err_uncorrectable[l] == !can, $sformatf("detect lane %0d e=%04h", l, e[l]));
        end
        case (kind[l])
          0: if (got == want && !err_corrected[l]) n_clean++;
          1: if (got == want && err_corrected[l]) n_single++;
          2: if (got == want && err_corrected[l]) n_double++;
          3: if (got == want && err_corrected[l]) n_mixed++;
          4: if (got == want && err_corrected[l]) n_parity++;
          default: if (err_uncorrectable[l]) n_unc++; else n_miscorrect++;
        endcase
      end
      rdata_held = cpu_rdata;
      @(negedge clk);
      cpu_rd = 1'b0;
      #1;
      check(cpu_rdata == 0 && !sram_oe[0] && !sram_oe[1], "read released");
      @(negedge clk);

      // Scrub: every tenth round the CPU writes the corrected word back,
      // which must leave clean code words in both banks.
      if (t % 10 == 0) begin
        cpu_wdata = rdata_held; cpu_wr = 1'b1;
        @(negedge clk);
        cpu_wr = 1'b0;
        for (int k = 0; k < DEV; k++) begin
          logic [31:0] w;
          w = peek(k, a);
          check(w == {ref_encode(rdata_held[16*k+8 +: 8]), ref_encode(rdata_held[16*k +: 8]),
                      rdata_held[16*k +: 16]}, "scrubbed word clean");
        end
        n_scrub++;
        @(negedge clk);
      end
    end

    $display("writes %0d, clean reads %0d, corrected: single data %0d, double data %0d, data+parity %0d, parity only %0d; 3-bit detected %0d, 3-bit miscorrected %0d; scrub write-backs %0d",
             n_write, n_clean, n_single, n_double, n_mixed, n_parity, n_unc, n_miscorrect, n_scrub);
    checks++;
    if (n_write == 0 || n_clean == 0 || n_single == 0 || n_double == 0 ||
        n_mixed == 0 || n_parity == 0 || n_unc == 0 || n_scrub == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
