// tb_scale_unit: random coefficient pairs through the scaling unit.  For the
// low-band column outputs (band 0) LL must be multiplied by zeta^2 and LH pass
// unchanged; for band 1, HL passes and HH is multiplied by 1/zeta^2.  Expected
// values come from the reference package (floor of the product by 2^14) and
// from floating point within one step.
module tb_scale_unit;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = DATA_W;
  logic band_i;
  logic signed [W-1:0] lo_i, hi_i, lo_o, hi_o;
  int checks = 0, failures = 0;

  scale_unit dut (.*);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint l, h;
    real    rl, rh;
    for (int n = 0; n < 1000; n++) begin
      l = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      h = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      band_i = n[0];
      lo_i = W'(l);
      hi_i = W'(h);
      #1;
      if (!band_i) begin
        chk("LL", lo_o, wrapw(fdiv(l * qc(ZETA * ZETA)), W));
        chk("LH", hi_o, h);
        rl = real'(l) * ZETA * ZETA;
        checks++;
        if (rl - real'(lo_o) > 40.0 || real'(lo_o) - rl > 40.0) begin
          failures++;
          $display("FAIL LL vs real %0d %f", lo_o, rl);
        end
      end else begin
        chk("HL", lo_o, l);
        chk("HH", hi_o, wrapw(fdiv(h * qc(1.0 / (ZETA * ZETA))), W));
        rh = real'(h) / (ZETA * ZETA);
        checks++;
        if (rh - real'(hi_o) > 40.0 || real'(hi_o) - rh > 40.0) begin
          failures++;
          $display("FAIL HH vs real %0d %f", hi_o, rh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
