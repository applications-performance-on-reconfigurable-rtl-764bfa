// tb_dist_matrix: fills a 5-city table at base address 7 through the host
// bus, then issues random requests on three ports every clock and checks each
// answer one clock later against a copy of the table kept here. Writes outside
// the table's address range must not change it.
module tb_dist_matrix;
  import rawcs_pkg::*;
  localparam int C = 5, NP = 3, BASE = 7, IW = $clog2(C*C);
  logic clk = 0;
  host_req_t req;
  logic [IW-1:0] index [NP];
  logic [31:0]   dout  [NP];
  int checks = 0, failures = 0;
  logic [31:0] ref_t [C*C];

  dist_matrix #(.DW(32), .CITIES(C), .NPORTS(NP), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [IW-1:0] prev [NP];
  initial begin
    req = HOST_IDLE;
    for (int p = 0; p < NP; p++) index[p] = '0;
    @(negedge clk);
    for (int i = 0; i < C*C; i++) begin
      ref_t[i] = $urandom;
      req = HOST_IDLE; req.wr = 1; req.addr = 24'(BASE + i); req.wdata = ref_t[i];
      @(negedge clk);
    end
    // Writes just outside the table.
    req = HOST_IDLE; req.wr = 1; req.addr = 24'(BASE - 1); req.wdata = 32'hdead;
    @(negedge clk);
    req.addr = 24'(BASE + C*C); @(negedge clk);
    req = HOST_IDLE;
    for (int p = 0; p < NP; p++) prev[p] = 'x;
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < NP; p++) begin
        prev[p]  = index[p];
        index[p] = IW'($urandom_range(0, C*C-1));
      end
      @(negedge clk);
      if (t > 0)
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (dout[p] !== ref_t[index[p]]) begin
            failures++;
            $display("FAIL port %0d index %0d: %0h vs %0h", p, index[p], dout[p], ref_t[index[p]]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
