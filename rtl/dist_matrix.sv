// dist_matrix: the inter-city distance table of the annealing engine.
//
// The host computes all CITIES x CITIES distances and writes them, one word
// per address, to addresses BASE .. BASE+CITIES^2-1 before annealing starts;
// after that the table is only read. Each of the NPORTS read ports serves one
// request per clock: the requester presents index = source + CITIES *
// destination and gets the distance on dout one clock later (registered
// output). With one port per annealing module this is the document's shared
// matrix; giving each module its own matrix with several ports, as the
// document suggests for more parallelism, is the same module with NPORTS
// raised. The index layout follows the document; the one-clock latency and
// the address base are this design's choices. The table is not reset.
module dist_matrix
  import rawcs_pkg::*;
#(
  parameter int unsigned DW     = 32,
  parameter int unsigned CITIES = 10,
  parameter int unsigned NPORTS = 4,
  parameter int unsigned BASE   = 0,
  localparam int unsigned ENTRIES = CITIES * CITIES,
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  host_req_t        req,
  input  logic [IDX_W-1:0] index [NPORTS],
  output logic [DW-1:0]    dout  [NPORTS]
);

  logic [DW-1:0] table_q [ENTRIES];
  logic          wr_hit;
  logic [HOST_AW:0] offset;   // one extra bit: set when addr is below BASE

  assign offset = {1'b0, req.addr} - (HOST_AW+1)'(BASE);
  assign wr_hit = req.wr && (offset < (HOST_AW+1)'(ENTRIES));

  always_ff @(posedge clk) begin
    if (wr_hit)
      table_q[offset[IDX_W-1:0]] <= req.wdata[DW-1:0];
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    always_ff @(posedge clk)
      dout[p] <= table_q[index[p]];
  end

endmodule
