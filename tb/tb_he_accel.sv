// Testbench of he_accel (MAX_LOGN = 6) through its AXI4 slave port.
// Writes and reads back the configuration registers, loads s, m+e and a with
// INCR bursts, starts each command through CTRL, polls STATUS, and reads c0
// with back-pressure on rready. c0 must match the reference model; done must
// be reported in STATUS and on irq_done once per command.
module tb_he_accel;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int ML = 6;
  localparam logic [17:0] REGS = 18'h20000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  awid, bid, arid, rid;
  logic [17:0] awaddr, araddr;
  logic [7:0]  awlen, arlen;
  logic [2:0]  awsize, arsize;
  logic [1:0]  awburst, arburst, bresp, rresp;
  logic        awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rlast, rvalid, rready, irq_done;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  int checks = 0, failures = 0, irqs = 0;

  axi_master_bfm #(.ADDR_W(18), .DATA_W(32)) bfm (.*);

  he_accel #(.MAX_LOGN(ML)) dut (
    .clk, .rst_n,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready), .irq_done
  );

  always @(posedge clk) if (irq_done) irqs++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  task automatic run_cmd(input he_op_e o);
    logic [31:0] st;
    int irqs0 = irqs;
    bfm.write1(REGS + 18'h0, 32'(o));
    do bfm.read1(REGS + 18'h4, st); while (st[0]);
    check(st[1], "STATUS.done after command");
    check(irqs == irqs0 + 1, "one irq_done per command");
  endtask

  task automatic load(input longint unsigned v[]);
    for (int i = 0; i < v.size(); i++) bfm.wbuf[i] = 32'(v[i]);
    bfm.write_burst(18'h0, v.size());
  endtask

  initial begin
    static int lg = 6, n = 64;
    longint unsigned s[], me[], a[];
    logic [31:0] rd;
    logic [63:0] mu;
    s = new[n]; me = new[n]; a = new[n];
    repeat (3) @(negedge clk);
    rst_n = 1;
    mu = barrett_mu(TQ);
    bfm.write1(REGS + 18'h08, 32'(lg));
    bfm.write1(REGS + 18'h0C, 32'(TQ));
    bfm.write1(REGS + 18'h10, mu[31:0]);
    bfm.write1(REGS + 18'h14, mu[63:32]);
    bfm.write1(REGS + 18'h18, 32'(psi_for(lg)));
    bfm.read1(REGS + 18'h08, rd); check(rd == 32'(lg), "LOGN readback");
    bfm.read1(REGS + 18'h0C, rd); check(rd == 32'(TQ), "Q readback");
    bfm.read1(REGS + 18'h10, rd); check(rd == mu[31:0], "MU_LO readback");
    bfm.read1(REGS + 18'h14, rd); check(rd == mu[63:32], "MU_HI readback");
    bfm.read1(REGS + 18'h18, rd); check(rd == 32'(psi_for(lg)), "PSI readback");
    bfm.read1(REGS + 18'h04, rd); check(rd == 0, "STATUS idle after reset");
    for (int i = 0; i < n; i++) begin
      s[i] = {$urandom, $urandom} % TQ; me[i] = {$urandom, $urandom} % TQ; a[i] = {$urandom, $urandom} % TQ;
    end
    run_cmd(OP_GEN_ROOTS);
    load(s);
    bfm.read_burst(18'h0, n);
    for (int i = 0; i < n; i++) check(bfm.rbuf[i] == 32'(s[i]), "shared DPRAM readback");
    run_cmd(OP_NTT_S);
    load(me);  run_cmd(OP_NTT_ME);
    load(a);   run_cmd(OP_ENCRYPT);
    ntt(s, lg, psi_for(lg), TQ);
    ntt(me, lg, psi_for(lg), TQ);
    bfm.stall_rready = 1;
    bfm.read_burst(18'h0, n);
    for (int i = 0; i < n; i++)
      check(64'(bfm.rbuf[i]) == (me[i] + TQ - mulmod(a[i], s[i], TQ)) % TQ,
            $sformatf("c0[%0d]", i));
    check(bfm.protocol_errors == 0, "AXI response ids, codes and rlast");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
