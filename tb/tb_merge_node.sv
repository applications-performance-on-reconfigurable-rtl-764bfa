// tb_merge_node: self-checking test of one merge-sort comparator node.
// Drives random and corner-case child values and load requests and compares
// read1/read2 and the node register with a reference model written here:
// the larger child wins on load, ties go to the right child, a child holding
// the all-ones "not filled" marker is always asked to load, and two all-ones
// children force the register to all-ones.
module tb_merge_node;
  localparam int DW = 8;
  logic clk = 0, rst;
  logic load, read1, read2;
  logic [DW-1:0] in1, in2, out;
  int checks = 0, failures = 0;

  merge_node #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [DW-1:0] model;
  logic e_r1, e_r2;
  logic [DW-1:0] pick[6];

  initial begin
    rst = 1; load = 0; in1 = 0; in2 = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    check("reset value", out, '1);
    model = '1;
    pick = '{8'hff, 8'h00, 8'h01, 8'h80, 8'hfe, 8'h7f};
    for (int t = 0; t < 600; t++) begin
      in1  = (t % 3 == 0) ? pick[$urandom_range(0, 5)] : DW'($urandom);
      in2  = (t % 4 == 0) ? pick[$urandom_range(0, 5)] : DW'($urandom);
      if (t % 7 == 0) in2 = in1;
      load = $urandom_range(0, 1);
      #1;
      e_r1 = load && ((in1 > in2) || (in1 == '1));
      e_r2 = load && ((in1 <= in2) || (in2 == '1));
      check("read1", DW'(read1), DW'(e_r1));
      check("read2", DW'(read2), DW'(e_r2));
      if (in1 == '1 && in2 == '1) model = '1;
      else if (load) model = (in1 > in2) ? in1 : in2;
      @(negedge clk);
      check("register", out, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
