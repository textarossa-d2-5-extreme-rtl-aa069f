// Testbench of he_rlwe_core (MAX_LOGN = 6): the full encryption sequence
// through the host port for n = 64 and then n = 16 with the same memories,
// modulo 2147352577, and then for n = 64 modulo 12289 and n = 32 modulo
// 2^30 - 2^18 + 1 (q, mu and psi are run-time inputs).
// Roots are generated, s and m+e are transformed, and c0 read back from the
// shared DPRAM must equal NTT(m+e) - a*NTT(s) mod q from the reference
// model. Command lengths are checked against 2n and logn*(n+4) + 1 /
// 2n + 5 cycles, and host accesses while busy must not disturb the memory.
module tb_he_rlwe_core;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int ML = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]    logn;
  logic [31:0]   q, psi, host_wdata, host_rdata;
  logic [63:0]   mu;
  logic          start, busy, done, host_en, host_we;
  he_op_e        op;
  logic [ML-1:0] host_addr;
  int checks = 0, failures = 0, cycles = 0;

  he_rlwe_core #(.MAX_LOGN(ML)) dut (.*);

  always @(posedge clk) cycles++;

  task automatic host_write(input int a, input longint unsigned d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = ML'(a); host_wdata = 32'(d);
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int a, output longint unsigned d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = ML'(a);
    @(negedge clk);
    host_en = 0;
    d = 64'(host_rdata);
  endtask

  task automatic command(input he_op_e o, input int exp_cycles);
    int t0;
    @(negedge clk);
    op = o; start = 1; t0 = cycles;
    @(negedge clk);
    start = 0;
    // a host write attempt while busy must be ignored
    host_en = 1; host_we = 1; host_addr = '0; host_wdata = 32'hDEAD_BEEF;
    @(negedge clk);
    host_en = 0; host_we = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycles - t0 != exp_cycles) begin
      failures++;
      $display("command %0d took %0d cycles, expected %0d", o, cycles - t0, exp_cycles);
    end
  endtask

  // qq: modulus, pp: primitive 2n-th root of unity modulo qq
  task automatic encrypt_run(input int lg, input longint unsigned qq, input longint unsigned pp);
    int n = 1 << lg;
    longint unsigned s[], me[], a[], c0;
    s = new[n]; me = new[n]; a = new[n];
    for (int i = 0; i < n; i++) begin
      s[i]  = {$urandom, $urandom} % qq;
      me[i] = {$urandom, $urandom} % qq;
      a[i]  = {$urandom, $urandom} % qq;
    end
    q = 32'(qq); mu = barrett_mu(qq);
    logn = 4'(lg); psi = 32'(pp);
    command(OP_GEN_ROOTS, 2 * n);
    for (int i = 0; i < n; i++) host_write(i, s[i]);
    command(OP_NTT_S, lg * (n + 4) + 1);
    for (int i = 0; i < n; i++) host_write(i, me[i]);
    command(OP_NTT_ME, lg * (n + 4) + 1);
    for (int i = 0; i < n; i++) host_write(i, a[i]);
    command(OP_ENCRYPT, 2 * n + 5);
    ntt(s, lg, pp, qq);
    ntt(me, lg, pp, qq);
    for (int i = 0; i < n; i++) begin
      longint unsigned exp_c0;
      exp_c0 = (me[i] + qq - mulmod(a[i], s[i], qq)) % qq;
      host_read(i, c0);
      checks++;
      if (c0 != exp_c0) begin
        failures++;
        if (failures < 6) $display("n=%0d c0[%0d]=%0d expected %0d", n, i, c0, exp_c0);
      end
    end
  endtask

  initial begin
    start = 0; op = OP_NONE; host_en = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    q = 32'(TQ); mu = barrett_mu(TQ); logn = 0; psi = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt_run(6, TQ, psi_for(6));
    encrypt_run(4, TQ, psi_for(4));
    // other moduli: 12289 (14 bits) and 2^30 - 2^18 + 1; 11 is a quadratic
    // non-residue of both, so 11^((q-1)/2n) has order exactly 2n
    encrypt_run(6, 64'd12289, powmod(64'd11, (64'd12289 - 1) / 128, 64'd12289));
    encrypt_run(5, 64'd1073479681, powmod(64'd11, (64'd1073479681 - 1) / 64, 64'd1073479681));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
