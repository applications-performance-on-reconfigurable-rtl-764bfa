// rawcs_top: the two computation structures side by side.
//
// The merge-sort tree and the simulated-annealing TSP engine are two separate
// applications of the same reconfigurable platform; they share only clock
// and reset here, and each keeps its own host bus (request in, read data
// out). See merge_sort_tree and tsp_anneal for their address maps. The
// annealing engine also brings out its done flag and its schedule event
// strobes.
module rawcs_top
  import rawcs_pkg::*;
#(
  parameter int unsigned SORT_N  = 256,
  parameter int unsigned SORT_DW = 32,
  parameter int unsigned CITIES  = 10,
  parameter int unsigned NUM_SA  = 4,
  parameter int unsigned TRIES_PER_T   = 250,
  parameter int unsigned ACCEPTS_PER_T = 60,
  parameter int unsigned TERMS   = 4,
  parameter int unsigned FRAC    = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  host_req_t          sort_req,
  output logic [HOST_DW-1:0] sort_rdata,
  input  host_req_t          tsp_req,
  output logic [HOST_DW-1:0] tsp_rdata,
  output logic               tsp_done,
  output logic               tsp_ev_cool,
  output logic               tsp_ev_early,
  output logic               tsp_ev_frozen
);

  merge_sort_tree #(.N(SORT_N), .DW(SORT_DW)) u_sort (
    .clk, .rst, .req(sort_req), .rdata(sort_rdata)
  );

  tsp_anneal #(
    .CITIES(CITIES), .NUM_SA(NUM_SA), .TRIES_PER_T(TRIES_PER_T),
    .ACCEPTS_PER_T(ACCEPTS_PER_T), .TERMS(TERMS), .FRAC(FRAC)
  ) u_tsp (
    .clk, .rst, .req(tsp_req), .rdata(tsp_rdata), .done(tsp_done),
    .ev_cool(tsp_ev_cool), .ev_early(tsp_ev_early), .ev_frozen(tsp_ev_frozen)
  );

endmodule
