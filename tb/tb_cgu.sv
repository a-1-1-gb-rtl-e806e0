// tb_cgu: checks every candidate of the candidate generation unit against
// X*(2c-7), X = floor(R*scale/4096), for random and corner coefficients in all
// three modulations.
module tb_cgu;
  import mimo_pkg::*;
  import mimo_ref_pkg::*;

  data_t r;
  mod_e  mod;
  ctab_t cand;
  int checks = 0, failures = 0;

  cgu dut (.r(r), .mod(mod), .cand(cand));

  task automatic check_one(int rv, int m);
    longint x;
    r   = data_t'(rv);
    mod = mod_e'(m);
    #1;
    x = ref_x(longint'(rv), m);
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (longint'(cand[c]) != x * (2 * c - 7)) begin
        failures++;
        $display("FAIL r=%0d mod=%0d c=%0d got %0d exp %0d", rv, m, c, cand[c], x * (2*c-7));
      end
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      check_one(0, m);
      check_one(256, m);
      check_one(-256, m);
      check_one(32767, m);
      check_one(-32768, m);
      for (int i = 0; i < 200; i++) check_one(int'($urandom_range(0, 65535)) - 32768, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
