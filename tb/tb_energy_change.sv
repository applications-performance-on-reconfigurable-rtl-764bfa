// tb_energy_change: random and extreme distance sets through the swap
// energy tree, compared with (AE+EC+DB+BF) - (AB+BC+DE+EF) computed here in
// 64-bit integers.
module tb_energy_change;
  localparam int DW = 32;
  logic [DW-1:0] d [8];
  logic signed [DW+2:0] delta;
  int checks = 0, failures = 0;
  longint e;

  energy_change #(.DW(DW)) dut (.*);

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int k = 0; k < 8; k++) begin
        case (t % 4)
          0: d[k] = $urandom;
          1: d[k] = $urandom_range(0, 1000);
          2: d[k] = (k < 4) ? '1 : '0;
          default: d[k] = (k < 4) ? '0 : '1;
        endcase
      end
      #1;
      e = 0;
      for (int k = 0; k < 4; k++) e += longint'(d[k]);
      for (int k = 4; k < 8; k++) e -= longint'(d[k]);
      checks++;
      if (longint'(delta) != e) begin
        failures++;
        $display("FAIL delta %0d expected %0d", delta, e);
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
