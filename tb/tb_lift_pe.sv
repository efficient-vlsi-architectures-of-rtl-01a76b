// tb_lift_pe: checks the four processing-element categories on random
// operands against integer arithmetic worked out here (floor of the product
// by 2^14, wrap to the sample width), and the (a) category against its
// real-valued result within the coefficient quantisation error.
module tb_lift_pe;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W  = 22;
  localparam int CA = -25987;  // alpha of the (9,7) predict step
  localparam int CB = 7266;

  logic signed [W-1:0] a, b, c, d_sym, d_anti, d_single, d_gen;
  int checks = 0, failures = 0;

  lift_pe #(.W(W), .CAT(PE_SYM),     .COEF_A(CA))              u_sym    (.a, .b, .c, .d(d_sym));
  lift_pe #(.W(W), .CAT(PE_ANTI),    .COEF_A(CA))              u_anti   (.a, .b, .c, .d(d_anti));
  lift_pe #(.W(W), .CAT(PE_SINGLE),  .COEF_A(CA))              u_single (.a, .b, .c, .d(d_single));
  lift_pe #(.W(W), .CAT(PE_GENERAL), .COEF_A(CA), .COEF_B(CB)) u_gen    (.a, .b, .c, .d(d_gen));

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d b=%0d c=%0d)", what, got, exp, a, b, c);
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
    longint la, lb, lc;
    real    rr, tol;
    for (int n = 0; n < 2000; n++) begin
      // operands kept inside +-2^18 so nothing wraps, plus a few full-range ones
      if (n < 1900) begin
        la = longint'($urandom_range(0, 1 << 19)) - (1 << 18);
        lb = longint'($urandom_range(0, 1 << 19)) - (1 << 18);
        lc = longint'($urandom_range(0, 1 << 19)) - (1 << 18);
      end else begin
        la = wrapw(longint'($urandom()), W);
        lb = wrapw(longint'($urandom()), W);
        lc = wrapw(longint'($urandom()), W);
      end
      a = W'(la); b = W'(lb); c = W'(lc);
      #1;
      expect_eq("sym",    d_sym,    wrapw(la + fdiv((lb + lc) * CA), W));
      expect_eq("anti",   d_anti,   wrapw(la + fdiv((lb - lc) * CA), W));
      expect_eq("single", d_single, wrapw(la + fdiv(lb * CA), W));
      expect_eq("general",d_gen,    wrapw(la + fdiv(lb * CB + lc * CA), W));
      if (n < 1900) begin
        // coefficient quantisation (half an LSB of 2^-14) plus the floor
        rr  = real'(la) + ALPHA * real'(lb + lc);
        tol = real'((lb + lc) < 0 ? -(lb + lc) : (lb + lc)) * 0.5 / 16384.0 + 1.5;
        checks++;
        if (real'(d_sym) - rr > tol || rr - real'(d_sym) > tol) begin
          failures++;
          $display("FAIL sym vs real: %0d vs %f", d_sym, rr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
