// Testbench of ntt_fsm: for NTT_S, NTT_ME (logn = 4) and ENCRYPT (logn = 3)
// the sequence of read addresses, root addresses and multiplexer selects and
// the sequence of write-back addresses are compared with the Cooley-Tukey
// loop nest written out directly. The strobes must follow the pipeline
// (alu_valid one cycle and wr_en five cycles after rd_en, never a read and a
// write together) and a stage of N butterflies must take 2N + 4 cycles.
module tb_ntt_fsm;
  import he_pkg::*;
  localparam int ML = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, rd_en, alu_valid, wr_en;
  he_op_e        op;
  logic [3:0]    logn;
  he_src_e       u_src, v_src;
  he_rsrc_e      r_src;
  he_dst_e       dst;
  logic [ML-1:0] rd_addr_a, rd_addr_b, root_addr, wr_addr_a, wr_addr_b;
  int checks = 0, failures = 0, cycles = 0;

  ntt_fsm #(.MAX_LOGN(ML)) dut (.*);

  always @(posedge clk) cycles++;

  int ea [$], eb [$], er [$], es [$], wa [$], wb [$];

  task automatic expect_fail(input string what);
    failures++;
    if (failures < 10) $display("mismatch: %s", what);
  endtask

  task automatic run(input he_op_e o, input int lg);
    int n = 1 << lg;
    int t0, nrd = 0, nwr = 0, nexp, nstages, exp_cycles;
    ea.delete(); eb.delete(); er.delete(); es.delete(); wa.delete(); wb.delete();
    if (o == OP_ENCRYPT) begin
      for (int i = 0; i < n; i++) begin ea.push_back(i); eb.push_back(i); er.push_back(0); es.push_back(0); end
    end else begin
      int t = n, st = 0;
      for (int m = 1; m < n; m *= 2) begin
        t /= 2;
        for (int i = 0; i < m; i++)
          for (int j = 2*i*t; j < 2*i*t + t; j++) begin
            ea.push_back(j); eb.push_back(j + t); er.push_back(m + i); es.push_back(st);
          end
        st++;
      end
    end
    nexp = ea.size();
    nstages = (o == OP_ENCRYPT) ? 1 : lg;
    exp_cycles = nstages * (2 * (nexp / nstages) + 4) + 1;
    @(negedge clk);
    op = o; logn = 4'(lg); start = 1;
    t0 = cycles;
    @(negedge clk); start = 0;
    while (!done) begin
      if (wr_en) begin
        checks++;
        if (wa.size() == 0) expect_fail("write without a read");
        else begin
          int a, b;
          a = wa.pop_front(); b = wb.pop_front();
          if (int'(wr_addr_a) != a || int'(wr_addr_b) != b)
            expect_fail($sformatf("op %0d write %0d: %0d/%0d expected %0d/%0d",
                                  o, nwr, wr_addr_a, wr_addr_b, a, b));
        end
        nwr++;
      end
      if (rd_en) begin
        int a, b, r, s;
        a = ea.pop_front(); b = eb.pop_front(); r = er.pop_front(); s = es.pop_front();
        wa.push_back(a); wb.push_back(b);
        checks++;
        if (int'(rd_addr_a) != a || int'(rd_addr_b) != b || (o != OP_ENCRYPT && int'(root_addr) != r))
          expect_fail($sformatf("op %0d read %0d: %0d/%0d/%0d expected %0d/%0d/%0d",
                                o, nrd, rd_addr_a, rd_addr_b, root_addr, a, b, r));
        checks++;
        case (o)
          OP_NTT_S:   if (dst != DST_DP1 || r_src != R_ROOTS ||
                          u_src != (s == 0 ? SRC_SHARED : SRC_DP1) || v_src != u_src) expect_fail("NTT_S selects");
          OP_NTT_ME:  if (dst != DST_DP2 || r_src != R_ROOTS ||
                          u_src != (s == 0 ? SRC_SHARED : SRC_DP2) || v_src != u_src) expect_fail("NTT_ME selects");
          default:    if (dst != DST_SHARED || r_src != R_SHARED ||
                          u_src != SRC_DP2 || v_src != SRC_DP1) expect_fail("ENCRYPT selects");
        endcase
        nrd++;
      end
      @(negedge clk);
    end
    checks++;
    if (nwr != nexp || nrd != nexp)
      expect_fail($sformatf("%0d reads and %0d writes, expected %0d", nrd, nwr, nexp));
    checks++;
    if (cycles - t0 != exp_cycles) expect_fail($sformatf("took %0d cycles, expected %0d", cycles - t0, exp_cycles));
  endtask

  // alu_valid follows rd_en by one cycle and wr_en by five; reads and
  // writes never share a cycle
  logic [5:1] rd_hist;
  always @(posedge clk) rd_hist <= rst_n ? {rd_hist[4:1], rd_en} : 5'b0;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (alu_valid != rd_hist[1] || wr_en != rd_hist[5] || (rd_en && wr_en))
      expect_fail($sformatf("strobes rd/alu/wr %b%b%b hist %b at %0t", rd_en, alu_valid, wr_en, rd_hist, $time));
  end

  initial begin
    start = 0; op = OP_NONE; logn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(OP_NTT_S, 4);
    run(OP_NTT_ME, 4);
    run(OP_ENCRYPT, 3);
    run(OP_NTT_S, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
