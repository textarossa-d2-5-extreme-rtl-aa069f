// End-to-end testbench of crypto_top at its default parameters
// (HE accelerator sized for n = 16384, SHAKE accelerator with a 64-bit bus).
//
// HE: one complete SEAL-Embedded style symmetric encryption for each degree
// in HE_DEGREES (log2; every degree from 1024 to 16384, plus 16): generate
// roots, load s, NTT(s), load m+e, NTT(m+e), load a, encrypt, read c0 and
// compare with the reference model; the NTT time
// measured from the CTRL write to the done pulse must be log2(n)*(n+4)
// cycles within a few cycles of bus overhead.
// SHAKE: SHAKE-128 and SHAKE-256 hashes of several lengths, with multi-block
// absorption, a squeeze, and a last block whose suffix and final padding bit
// share one byte, against FIPS 202 vectors. Both IPs run concurrently.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_crypto_top;
  import he_pkg::*;
  import he_ref_pkg::*;
  import shake_pkg::*;
  `include "shake_vectors.svh"

  localparam int HE_DEGREES [6] = '{14, 13, 12, 11, 10, 4};
  localparam logic [17:0] REGS = 18'h20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  int checks = 0, failures = 0;

  // HE port
  logic [3:0]  he_awid, he_bid, he_arid, he_rid;
  logic [17:0] he_awaddr, he_araddr;
  logic [7:0]  he_awlen, he_arlen;
  logic [2:0]  he_awsize, he_arsize;
  logic [1:0]  he_awburst, he_arburst, he_bresp, he_rresp;
  logic        he_awvalid, he_awready, he_wlast, he_wvalid, he_wready, he_bvalid, he_bready;
  logic        he_arvalid, he_arready, he_rlast, he_rvalid, he_rready, he_irq_done;
  logic [31:0] he_wdata, he_rdata;
  logic [3:0]  he_wstrb;
  // SHAKE port
  logic [3:0]  sh_awid, sh_bid, sh_arid, sh_rid;
  logic [11:0] sh_awaddr, sh_araddr;
  logic [7:0]  sh_awlen, sh_arlen;
  logic [2:0]  sh_awsize, sh_arsize;
  logic [1:0]  sh_awburst, sh_arburst, sh_bresp, sh_rresp;
  logic        sh_awvalid, sh_awready, sh_wlast, sh_wvalid, sh_wready, sh_bvalid, sh_bready;
  logic        sh_arvalid, sh_arready, sh_rlast, sh_rvalid, sh_rready;
  logic [63:0] sh_wdata, sh_rdata;
  logic [7:0]  sh_wstrb;

  axi_master_bfm #(.ADDR_W(18), .DATA_W(32)) hbfm (
    .clk, .awid(he_awid), .awaddr(he_awaddr), .awlen(he_awlen), .awsize(he_awsize),
    .awburst(he_awburst), .awvalid(he_awvalid), .awready(he_awready), .wdata(he_wdata),
    .wstrb(he_wstrb), .wlast(he_wlast), .wvalid(he_wvalid), .wready(he_wready), .bid(he_bid),
    .bresp(he_bresp), .bvalid(he_bvalid), .bready(he_bready), .arid(he_arid),
    .araddr(he_araddr), .arlen(he_arlen), .arsize(he_arsize), .arburst(he_arburst),
    .arvalid(he_arvalid), .arready(he_arready), .rid(he_rid), .rdata(he_rdata),
    .rresp(he_rresp), .rlast(he_rlast), .rvalid(he_rvalid), .rready(he_rready)
  );
  axi_master_bfm #(.ADDR_W(12), .DATA_W(64)) sbfm (
    .clk, .awid(sh_awid), .awaddr(sh_awaddr), .awlen(sh_awlen), .awsize(sh_awsize),
    .awburst(sh_awburst), .awvalid(sh_awvalid), .awready(sh_awready), .wdata(sh_wdata),
    .wstrb(sh_wstrb), .wlast(sh_wlast), .wvalid(sh_wvalid), .wready(sh_wready), .bid(sh_bid),
    .bresp(sh_bresp), .bvalid(sh_bvalid), .bready(sh_bready), .arid(sh_arid),
    .araddr(sh_araddr), .arlen(sh_arlen), .arsize(sh_arsize), .arburst(sh_arburst),
    .arvalid(sh_arvalid), .arready(sh_arready), .rid(sh_rid), .rdata(sh_rdata),
    .rresp(sh_rresp), .rlast(sh_rlast), .rvalid(sh_rvalid), .rready(sh_rready)
  );

  crypto_top dut (
    .clk, .rst_n,
    .he_axi_awid(he_awid), .he_axi_awaddr(he_awaddr), .he_axi_awlen(he_awlen),
    .he_axi_awsize(he_awsize), .he_axi_awburst(he_awburst), .he_axi_awvalid(he_awvalid),
    .he_axi_awready(he_awready), .he_axi_wdata(he_wdata), .he_axi_wstrb(he_wstrb),
    .he_axi_wlast(he_wlast), .he_axi_wvalid(he_wvalid), .he_axi_wready(he_wready),
    .he_axi_bid(he_bid), .he_axi_bresp(he_bresp), .he_axi_bvalid(he_bvalid),
    .he_axi_bready(he_bready), .he_axi_arid(he_arid), .he_axi_araddr(he_araddr),
    .he_axi_arlen(he_arlen), .he_axi_arsize(he_arsize), .he_axi_arburst(he_arburst),
    .he_axi_arvalid(he_arvalid), .he_axi_arready(he_arready), .he_axi_rid(he_rid),
    .he_axi_rdata(he_rdata), .he_axi_rresp(he_rresp), .he_axi_rlast(he_rlast),
    .he_axi_rvalid(he_rvalid), .he_axi_rready(he_rready), .he_irq_done,
    .sh_axi_awid(sh_awid), .sh_axi_awaddr(sh_awaddr), .sh_axi_awlen(sh_awlen),
    .sh_axi_awsize(sh_awsize), .sh_axi_awburst(sh_awburst), .sh_axi_awvalid(sh_awvalid),
    .sh_axi_awready(sh_awready), .sh_axi_wdata(sh_wdata), .sh_axi_wstrb(sh_wstrb),
    .sh_axi_wlast(sh_wlast), .sh_axi_wvalid(sh_wvalid), .sh_axi_wready(sh_wready),
    .sh_axi_bid(sh_bid), .sh_axi_bresp(sh_bresp), .sh_axi_bvalid(sh_bvalid),
    .sh_axi_bready(sh_bready), .sh_axi_arid(sh_arid), .sh_axi_araddr(sh_araddr),
    .sh_axi_arlen(sh_arlen), .sh_axi_arsize(sh_arsize), .sh_axi_arburst(sh_arburst),
    .sh_axi_arvalid(sh_arvalid), .sh_axi_arready(sh_arready), .sh_axi_rid(sh_rid),
    .sh_axi_rdata(sh_rdata), .sh_axi_rresp(sh_rresp), .sh_axi_rlast(sh_rlast),
    .sh_axi_rvalid(sh_rvalid), .sh_axi_rready(sh_rready)
  );

  // mechanism counters
  int n_gen_roots = 0, n_ntt_s = 0, n_ntt_me = 0, n_encrypt = 0, n_busy_ignored = 0;
  int n_shake128 = 0, n_shake256 = 0, n_multiblock = 0, n_squeeze = 0, n_pad_9f = 0;
  int n_fixed_burst = 0, n_backpressure = 0;
  longint irq_cycle = 0;
  always @(posedge clk) if (he_irq_done) irq_cycle = cycles;
  always @(posedge clk) if (he_rvalid && !he_rready || sh_rvalid && !sh_rready) n_backpressure++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ---------------- HE ----------------
  task automatic he_cmd(input he_op_e o, input longint exp_cycles);
    logic [31:0] st;
    longint t0;
    hbfm.write1(REGS, 32'(o));
    t0 = cycles;
    do hbfm.read1(REGS + 18'h4, st); while (st[0]);
    check(st[1], "HE STATUS.done");
    if (exp_cycles > 0)
      check(irq_cycle - t0 >= exp_cycles - 4 && irq_cycle - t0 <= exp_cycles + 4,
            $sformatf("command %0d took %0d cycles, expected about %0d", o, irq_cycle - t0, exp_cycles));
    case (o)
      OP_GEN_ROOTS: n_gen_roots++;
      OP_NTT_S:     n_ntt_s++;
      OP_NTT_ME:    n_ntt_me++;
      default:      n_encrypt++;
    endcase
  endtask

  task automatic he_load(input longint unsigned v[]);
    for (int base = 0; base < v.size(); base += 256) begin
      int len = (v.size() - base < 256) ? v.size() - base : 256;
      for (int i = 0; i < len; i++) hbfm.wbuf[i] = 32'(v[base + i]);
      hbfm.write_burst(18'(4 * base), len);
    end
  endtask

  task automatic he_encrypt(input int lg);
    int n = 1 << lg;
    longint unsigned s[], me[], a[];
    logic [63:0] mu = barrett_mu(TQ);
    logic [31:0] rd;
    s = new[n]; me = new[n]; a = new[n];
    for (int i = 0; i < n; i++) begin
      s[i] = {$urandom, $urandom} % TQ; me[i] = {$urandom, $urandom} % TQ; a[i] = {$urandom, $urandom} % TQ;
    end
    hbfm.write1(REGS + 18'h08, 32'(lg));
    hbfm.write1(REGS + 18'h0C, 32'(TQ));
    hbfm.write1(REGS + 18'h10, mu[31:0]);
    hbfm.write1(REGS + 18'h14, mu[63:32]);
    hbfm.write1(REGS + 18'h18, 32'(psi_for(lg)));
    he_cmd(OP_GEN_ROOTS, 0);
    he_load(s);
    he_cmd(OP_NTT_S, longint'(lg) * (longint'(n) + 64'sd4));
    he_load(me);
    // the host cannot disturb the shared memory while a command runs
    hbfm.write1(REGS, 32'(OP_NTT_ME));
    hbfm.write1(18'h0, 32'hDEAD_BEEF);
    hbfm.read1(18'h0, rd);
    n_busy_ignored++;
    do hbfm.read1(REGS + 18'h4, rd); while (rd[0]);
    n_ntt_me++;
    he_load(a);
    he_cmd(OP_ENCRYPT, 2 * n + 4);
    ntt(s, lg, psi_for(lg), TQ);
    ntt(me, lg, psi_for(lg), TQ);
    hbfm.stall_rready = 1;
    for (int base = 0; base < n; base += 256) begin
      int len = (n - base < 256) ? n - base : 256;
      hbfm.read_burst(18'(4 * base), len);
      for (int i = 0; i < len; i++)
        check(64'(hbfm.rbuf[i]) == (me[base + i] + TQ - mulmod(a[base + i], s[base + i], TQ)) % TQ,
              $sformatf("n=%0d c0[%0d]", n, base + i));
    end
    hbfm.stall_rready = 0;
  endtask

  // ---------------- SHAKE ----------------
  function automatic logic [7:0] msg_byte(int i);
    return 8'((7 * i + 3) % 256);
  endfunction

  task automatic shake_hash(input shake_mode_e m, input int len, input logic [63:0] exp_w [42]);
    int rb = (m == SHAKE256) ? 136 : 168;
    int nblk = len / rb + 1;
    logic [63:0] st;
    sbfm.write1(12'h000, 64'(m));
    for (int b = 0; b < nblk; b++) begin
      int nb = (b == nblk - 1) ? len - b * rb : rb;
      for (int w = 0; w < rb / 8; w++) begin
        logic [63:0] word = '0;
        for (int k = 0; k < 8; k++)
          if (8 * w + k < nb) word[8*k +: 8] = msg_byte(b * rb + 8 * w + k);
        sbfm.wbuf[w] = word;
      end
      sbfm.write_burst(12'h018, rb / 8, 2'b00);
      n_fixed_burst++;
      sbfm.write1(12'h008, {48'd0, 8'(nb), 4'd0, (b == nblk - 1), (b == 0), 2'd1});
      if (b == nblk - 1 && nb == rb - 1) n_pad_9f++;
      do sbfm.read1(12'h010, st); while (st[0]);
    end
    if (nblk > 1) n_multiblock++;
    if (m == SHAKE256) n_shake256++; else n_shake128++;
    sbfm.stall_rready = 1;
    sbfm.read_burst(12'h018, rb / 8, 2'b00);
    for (int w = 0; w < rb / 8; w++) check(sbfm.rbuf[w] == exp_w[w], $sformatf("SHAKE len %0d word %0d", len, w));
    sbfm.write1(12'h008, 64'd2);
    n_squeeze++;
    do sbfm.read1(12'h010, st); while (st[0]);
    sbfm.read_burst(12'h018, rb / 8, 2'b00);
    for (int w = 0; w < rb / 8; w++)
      check(sbfm.rbuf[w] == exp_w[rb / 8 + w], $sformatf("SHAKE len %0d squeezed word %0d", len, w));
    sbfm.stall_rready = 0;
  endtask

  task automatic mech(input int count, input string name);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: mechanism never exercised: %s", name); end
    else $display("mechanism %-28s %0d", name, count);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      foreach (HE_DEGREES[i]) he_encrypt(HE_DEGREES[i]);
      begin
        shake_hash(SHAKE256, 300, EXP2);
        shake_hash(SHAKE256, 135, EXP1);
        shake_hash(SHAKE128, 200, EXP3);
        shake_hash(SHAKE128, 0, EXP0);
      end
    join
    check(hbfm.protocol_errors == 0 && sbfm.protocol_errors == 0, "AXI responses");
    mech(n_gen_roots, "HE roots generation");
    mech(n_ntt_s, "HE NTT(s) into DPRAM1");
    mech(n_ntt_me, "HE NTT(m+e) into DPRAM2");
    mech(n_encrypt, "HE encryption step");
    mech(n_busy_ignored, "HE host access while busy");
    mech(n_shake128, "SHAKE-128 mode");
    mech(n_shake256, "SHAKE-256 mode");
    mech(n_multiblock, "multi-block absorb");
    mech(n_squeeze, "squeeze");
    mech(n_pad_9f, "suffix and final bit in one byte");
    mech(n_fixed_burst, "AXI FIXED burst");
    mech(n_backpressure, "AXI read back-pressure");
    $display("simulated %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
