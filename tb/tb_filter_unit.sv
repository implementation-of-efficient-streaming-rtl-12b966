// tb_filter_unit: random filter lines through one filter unit, compared with
// the reference filter of dbf_ref_pkg; the limits are built from the
// reference tables, not from threshold_derivation.
module tb_filter_unit;
  import dbf_pkg::*;
  import dbf_ref_pkg::*;

  edge_line_t line_in, line_out;
  thresh_t    th;
  logic       chroma;
  int checks = 0, failures = 0, changed = 0;

  filter_unit dut (.line_in, .th, .chroma, .line_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v[8], qp, bs, base;
    for (int n = 0; n < 4000; n++) begin
      qp = $urandom_range(0, 51);
      bs = $urandom_range(0, 3);
      chroma = n[0];
      base = $urandom_range(0, 255);
      for (int i = 0; i < 8; i++) begin
        // mostly small steps so the filter engages; sometimes arbitrary values
        v[i] = (n % 5 == 0) ? int'($urandom_range(0, 255))
                            : clip(0, 255, base + int'($urandom_range(0, 10)) - 5 + ((i >= 4) ? int'($urandom_range(0, 12)) : 0));
      end
      for (int i = 0; i < 4; i++) begin
        line_in.p[i] = pixel_t'(v[3 - i]);
        line_in.q[i] = pixel_t'(v[4 + i]);
      end
      th.alpha  = 8'(alpha_of(qp));
      th.beta   = 5'(beta_of(qp));
      th.tc0    = 5'(tc0_of(qp, bs));
      th.enable = (bs != 0);
      #1;
      filter8(v, qp, bs, chroma);
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (line_out.p[i] != pixel_t'(v[3 - i]) || line_out.q[i] != pixel_t'(v[4 + i])) begin
          failures++;
          if (failures < 10)
            $display("mismatch n=%0d qp=%0d bs=%0d chroma=%0d i=%0d got p=%0d q=%0d exp p=%0d q=%0d",
                     n, qp, bs, chroma, i, line_out.p[i], line_out.q[i], v[3 - i], v[4 + i]);
        end
      end
      if (line_out != line_in) changed++;
    end
    // the filter must actually have moved pixels in a good share of cases
    checks++;
    if (changed < 500) begin
      failures++;
      $display("filter changed only %0d lines", changed);
    end
    $display("lines changed by the filter: %0d", changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
