// merge_sort_tree: hardware merge sort as a binary tree of comparator nodes.
//
// N keys sit in N leaf registers. Above them is a complete binary tree of
// N-1 comparator nodes, each with its own register (Figure "merge sort
// construct": data flows up, load requests flow down). When the host reads
// the root, the root keeps the larger of its two children and asks that child
// to refill itself; the child does the same with its own children, and so on
// down to a leaf, all within the same clock. The tree therefore behaves as a
// log2(N)-deep pipeline of merges: after the all-ones "not filled" markers
// have been read out of the log2(N)-1 levels below the root, every read
// delivers the next key in descending order, one key per clock.
//
// Loading: with SCAN = 1 the host writes the N keys one after another to
// address SCAN_ID and they shift through the leaves (the first key written
// ends in the last leaf); with SCAN = 0 the host writes key j to address j.
// Reading: address N+1. Keys must be below 2^DW-1 (all-ones is the marker);
// a key of 0 is indistinguishable from an exhausted leaf but still comes out
// in the right place, last.
//
// Node numbering is heap order: node 1 is the root, node i has children 2i
// and 2i+1, and leaf j is node N+j. Addresses, the scan chain and the
// all-ones/0 markers follow the document; the heap numbering is this design's.
module merge_sort_tree
  import rawcs_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned DW      = 32,
  parameter bit          SCAN    = 1'b1,
  parameter int unsigned IDW     = 15,
  parameter int unsigned SCAN_ID = 2000
) (
  input  logic               clk,
  input  logic               rst,
  input  host_req_t          req,
  output logic [HOST_DW-1:0] rdata
);

  // Register value and load request of every node, heap-indexed; the root (node 1) lives
  // inside the top node.
  logic [DW-1:0] val  [2:2*N-1];
  logic          ld   [2:2*N-1];
  logic          scan_en;
  logic [DW-1:0] scan_head;

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "merge_sort_tree: N must be a power of two, at least 2");
  end

  merge_top_node #(
    .DW(DW), .IDW(IDW), .SCAN(SCAN), .ID(N + 1), .SCAN_ID(SCAN_ID)
  ) u_top (
    .clk, .rst, .req,
    .in1(val[2]), .in2(val[3]), .read1(ld[2]), .read2(ld[3]),
    .scan_en, .scan_out(scan_head), .rdata
  );

  for (genvar i = 2; i < N; i++) begin : g_node
    merge_node #(.DW(DW)) u_node (
      .clk, .rst, .load(ld[i]),
      .in1(val[2*i]), .in2(val[2*i+1]),
      .read1(ld[2*i]), .read2(ld[2*i+1]),
      .out(val[i])
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_leaf
    merge_leaf #(.DW(DW), .IDW(IDW), .SCAN(SCAN), .ID(j)) u_leaf (
      .clk, .rst, .req, .scan_en,
      .scan_in(j == 0 ? scan_head : val[N+j-1]),
      .load(ld[N+j]),
      .out(val[N+j])
    );
  end

endmodule
