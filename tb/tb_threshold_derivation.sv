// tb_threshold_derivation: every QP (0..63) and bS against the reference
// tables of dbf_ref_pkg.
module tb_threshold_derivation;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  logic [5:0] qp;
  logic [1:0] bs;
  thresh_t    th;
  int checks = 0, failures = 0;

  threshold_derivation dut (.qp, .bs, .th);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 64; q++)
      for (int b = 0; b < 4; b++) begin
        qp = 6'(q); bs = 2'(b);
        #1;
        checks += 4;
        if (int'(th.alpha) != alpha_of(q)) failures++;
        if (int'(th.beta)  != beta_of(q))  failures++;
        if (int'(th.tc0)   != tc0_of(q, b)) begin
          failures++;
          $display("tc0 qp=%0d bs=%0d got %0d exp %0d", q, b, th.tc0, tc0_of(q, b));
        end
        if (th.enable != (b != 0)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
