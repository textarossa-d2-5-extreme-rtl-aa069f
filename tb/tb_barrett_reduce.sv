// Testbench of barrett_reduce: random products of residues for several
// moduli (the 31-bit NTT prime, a small prime, 2^30+3 and 3) checked against
// the % operator, plus the extreme product (q-1)^2.
module tb_barrett_reduce;
  import he_ref_pkg::*;

  logic [63:0] x, mu;
  logic [31:0] q, r;
  int checks = 0, failures = 0;

  barrett_reduce dut (.x, .q, .mu, .r);

  initial begin
    static longint unsigned qs [4] = '{TQ, 64'd12289, 64'd1073741827, 64'd3};
    foreach (qs[k]) begin
      q  = 32'(qs[k]);
      mu = barrett_mu(qs[k]);
      for (int i = 0; i < 2001; i++) begin
        longint unsigned a, b;
        if (i == 0) begin a = qs[k] - 1; b = qs[k] - 1; end
        else begin
          a = {$urandom, $urandom} % qs[k];
          b = {$urandom, $urandom} % qs[k];
        end
        x = a * b;
        #1;
        checks++;
        if (64'(r) != x % qs[k]) begin
          failures++;
          if (failures < 5) $display("mismatch q=%0d x=%0d r=%0d exp=%0d", q, x, r, x % qs[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
