`timescale 1ns / 1ps
// tb_td_sorter: checks Max / Second selection of the sorter on random and
// hand-picked TD triples (L = 3) against a sort done in the testbench,
// including ties, which rank the lower section first.
module tb_td_sorter;
  import adscd_pkg::*;
  localparam int unsigned L = L_SECTIONS;
  localparam int unsigned TDW = TD_W;

  logic [TDW-1:0] td [L];
  logic [$clog2(L)-1:0] max_idx, sec_idx;
  logic [TDW-1:0] max_val, sec_val;
  int checks = 0, failures = 0;

  td_sorter dut (.td, .max_idx, .sec_idx, .max_val, .sec_val);

  task automatic check_one();
    int bi = 0, si;
    for (int k = 1; k < int'(L); k++) if (td[k] > td[bi]) bi = k;
    si = (bi == 0) ? 1 : 0;
    for (int k = 0; k < int'(L); k++) if (k != bi && td[k] > td[si]) si = k;
    #1;
    checks++;
    if (int'(max_idx) != bi || int'(sec_idx) != si || max_val != td[bi] || sec_val != td[si]) begin
      failures++;
      $display("FAIL: td=%0d,%0d,%0d got max %0d sec %0d, expected %0d %0d",
               td[0], td[1], td[2], max_idx, sec_idx, bi, si);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < int'(L); k++)
        td[k] = (n % 5 == 0) ? TDW'($urandom_range(3)) : TDW'($urandom);
      check_one();
    end
    td = '{100, 300, 200}; check_one();
    td = '{300, 100, 200}; check_one();
    td = '{100, 200, 300}; check_one();
    td = '{7, 7, 7};       check_one();
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
