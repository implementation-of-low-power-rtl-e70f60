// tb_incr_mux: checks the increment selected for every modulation, ID and
// phase against the difference of consecutive addresses of the reference
// permutation (rows 0..2 of each block).
module tb_incr_mux;
  import ilv_pkg::*;
  import ilv_ref_pkg::*;
  mod_t       mod_type;
  logic [2:0] id;
  logic       tff_q;
  logic [1:0] m3_q;
  logic [6:0] inc;
  int checks = 0, failures = 0;

  incr_mux dut (.mod_type, .id, .tff_q, .m3_q, .inc);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 8; i++) begin
        int n, s;
        n = ref_ncbps(m, i);
        s = ref_s(m);
        for (int k = 0; k < 48; k++) begin
          int r, q, ph;
          r = k / 16;
          q = k % 16;
          if (q == 15) continue;
          ph = ((r - q) % s + s) % s;  // phase of the pattern at column q
          mod_type = mod_t'(m); id = 3'(i);
          tff_q = ph[0];
          m3_q  = 2'(ph);
          #1;
          checks++;
          if (int'(inc) != ref_jk(n, s, k + 1) - ref_jk(n, s, k)) begin
            failures++;
            $display("FAIL mod=%0d id=%0d k=%0d inc=%0d expected %0d", m, i, k, inc,
                     ref_jk(n, s, k + 1) - ref_jk(n, s, k));
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
