// tb_exp_approx: the truncated exponential series with 1 to 4 terms in the
// integer form (FRAC = 0), compared with the series evaluated here with C-like
// truncating integer division, and the 4-term series with 8 fractional bits
// compared with the real-valued series (within 0.05).
module tb_exp_approx;
  localparam int XW = 32;
  logic signed [XW-1:0] x, xf;
  logic signed [4*XW-1:0] y1, y2, y3, y4, yf;
  int checks = 0, failures = 0;

  exp_approx #(.XW(XW), .FRAC(0), .TERMS(1)) d1 (.x(x), .y(y1));
  exp_approx #(.XW(XW), .FRAC(0), .TERMS(2)) d2 (.x(x), .y(y2));
  exp_approx #(.XW(XW), .FRAC(0), .TERMS(3)) d3 (.x(x), .y(y3));
  exp_approx #(.XW(XW), .FRAC(0), .TERMS(4)) d4 (.x(x), .y(y4));
  exp_approx #(.XW(XW), .FRAC(8), .TERMS(4)) df (.x(xf), .y(yf));

  function automatic longint tdiv(longint a, longint b);
    // C integer division: truncate toward zero.
    longint q;
    q = (a < 0 ? -a : a) / b;
    return (a < 0) ? -q : q;
  endfunction

  task automatic chk(string n, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d got %0d expected %0d", n, x, got, exp);
    end
  endtask

  initial begin
    longint xv, s1, s2, s3, s4;
    real xr, yr;
    for (int t = 0; t < 600; t++) begin
      xv = (t < 40) ? longint'(t - 30) : longint'($urandom_range(0, 4000)) - 2000;
      x  = XW'(xv);
      xr = $itor($urandom_range(0, 1200)) / 256.0 - 3.0;
      xf = XW'($rtoi(xr * 256.0));
      xr = $itor(xf) / 256.0;
      #1;
      s1 = 1 + xv;
      s2 = s1 + tdiv(xv*xv, 2);
      s3 = s2 + tdiv(xv*xv*xv, 6);
      s4 = s3 + tdiv(xv*xv*xv*xv, 24);
      chk("1 term", longint'(y1), s1);
      chk("2 terms", longint'(y2), s2);
      chk("3 terms", longint'(y3), s3);
      chk("4 terms", longint'(y4), s4);
      yr = 1.0 + xr + xr*xr/2.0 + xr*xr*xr/6.0 + xr*xr*xr*xr/24.0;
      checks++;
      if ((($itor(yf) / 256.0) - yr) > 0.05 || (yr - ($itor(yf) / 256.0)) > 0.05) begin
        failures++;
        $display("FAIL fixed point x=%f got %f expected %f", xr, $itor(yf)/256.0, yr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
