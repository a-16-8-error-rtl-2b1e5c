// tb_edac_device: test of one 16-bit EDAC device with its strobe control.
// A small memory array in the testbench stands for the SRAM. Checks:
//  - strobe decoding: write gives mem_we only, read mem_oe only, idle and
//    both strobes give neither; read data and flags are zero unless reading;
//  - a write stores the CPU word unaltered and each byte's parity as the
//    reference encoder computes it;
//  - a read returns the written word after every kind of error of weight
//    <= 2 per byte lane (data, parity, mixed), with corrected raised when
//    the lane's syndrome is non-zero, and flags three-bit errors that the
//    code cannot correct.
module tb_edac_device;
  import qc_ref_pkg::*;

  localparam int LANES = 2;

  logic              rd, wr;
  logic [15:0]       cpu_wdata, cpu_rdata, mem_wdata, mem_wparity, mem_rdata, mem_rparity;
  logic [LANES-1:0]  corrected, uncorrectable;
  logic              mem_we, mem_oe;
  int checks = 0, failures = 0;

  logic [31:0] mem [16];   // {parity, data}
  logic [3:0]  addr;
  logic [15:0] golden [16];
  int n_corr = 0, n_unc = 0;

  edac_device #(.LANES(LANES)) dut (
    .rd(rd), .wr(wr), .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata),
    .corrected(corrected), .uncorrectable(uncorrectable),
    .mem_we(mem_we), .mem_oe(mem_oe), .mem_wdata(mem_wdata),
    .mem_wparity(mem_wparity), .mem_rdata(mem_rdata), .mem_rparity(mem_rparity));

  assign {mem_rparity, mem_rdata} = mem[addr];

  initial begin : watchdog
    #1000000;
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

  task automatic do_write(logic [3:0] a, logic [15:0] d);
    addr = a; cpu_wdata = d; wr = 1'b1; rd = 1'b0;
    #1;
    check(mem_we && !mem_oe, "write enables");
    check(mem_wdata == d, "write data unaltered");
    check(mem_wparity == {ref_encode(d[15:8]), ref_encode(d[7:0])}, "write parity");
    check(cpu_rdata == 16'h0 && corrected == 0 && uncorrectable == 0, "quiet bus on write");
    if (mem_we) mem[a] = {mem_wparity, mem_wdata};
    wr = 1'b0;
    #1;
  endtask

  // Flip pattern e (16 bits over {p,m} of one lane) into lane k of word a.
  task automatic inject(logic [3:0] a, int k, logic [15:0] e);
    mem[a][8*k +: 8]      ^= e[7:0];
    mem[a][16 + 8*k +: 8] ^= e[15:8];
  endtask

  initial begin
    rd = 0; wr = 0; cpu_wdata = 0; addr = 0;
    for (int i = 0; i < 16; i++) mem[i] = 32'h0;
    #1;
    check(!mem_we && !mem_oe && cpu_rdata == 0, "idle");
    rd = 1; wr = 1; #1;
    check(!mem_we && !mem_oe && cpu_rdata == 0, "both strobes");
    rd = 0; wr = 0; #1;

    for (int t = 0; t < 3000; t++) begin
      logic [3:0]  a;
      logic [15:0] d;
      logic [15:0] e [LANES];
      logic        exp_unc [LANES];
      a = 4'($urandom);
      d = 16'($urandom);
      do_write(a, d);
      golden[a] = d;
      for (int k = 0; k < LANES; k++) begin
        e[k] = rand_pattern(t % 4);    // weight 0..3
        inject(a, k, e[k]);
      end
      addr = a; rd = 1'b1;
      #1;
      check(mem_oe && !mem_we, "read enables");
      for (int k = 0; k < LANES; k++) begin
        // reference: can a pattern of weight <= 2 explain this syndrome?
        logic [7:0] sy;
        logic found;
        sy = ref_syndrome(e[k]);
        found = 1'b0;
        for (int x = 0; x <= 16; x++)
          for (int y = x; y <= 16; y++) begin
            logic [15:0] f;
            f = 16'h0;
            if (x < 16) f[x] = 1'b1;
            if (y < 16) f[y] = 1'b1;
            if (ref_syndrome(f) == sy) found = 1'b1;
          end
        exp_unc[k] = !found;
        if (popcount16(e[k]) <= 2)
          check(cpu_rdata[8*k +: 8] == d[8*k +: 8], $sformatf("corrected data lane %0d e=%04h", k, e[k]));
        check(uncorrectable[k] == exp_unc[k], $sformatf("uncorrectable lane %0d e=%04h", k, e[k]));
        check(corrected[k] == (sy != 0 && found), $sformatf("corrected flag lane %0d", k));
        if (exp_unc[k])
          check(cpu_rdata[8*k +: 8] == mem[a][8*k +: 8], "uncorrectable data passes unaltered");
        if (corrected[k]) n_corr++;
        if (uncorrectable[k]) n_unc++;
      end
      rd = 1'b0;
      #1;
      check(cpu_rdata == 0 && !mem_oe, "read data released");
      mem[a] = {16'h0, 16'h0};
    end
    checks++;
    if (n_corr == 0 || n_unc == 0) begin
      failures++;
      $display("FAIL corrected %0d uncorrectable %0d", n_corr, n_unc);
    end
    $display("lane reads corrected %0d, uncorrectable %0d", n_corr, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
