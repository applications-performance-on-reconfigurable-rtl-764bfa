// tsp_anneal: simulated-annealing engine for the travelling salesperson problem.
//
// NUM_SA annealing modules (sim_anneal) each improve a private tour of CITIES
// cities by random two-city swaps. They share one distance matrix that serves
// one request per module per clock, and each has its own random generator
// (subtractive_rand, seeded -500 + 500*j for module j as in the document).
// A control module (tsp_control) runs the linear cooling schedule, stops the
// modules and hands the shortest tour back to the host.
//
// Host address map (24-bit word addresses, own layout):
//   0 .. CITIES^2-1                 distance from city s to city t at s + CITIES*t
//   MB(j) .. MB(j)+CITIES-1         initial tour of module j, MB(j) = CITIES^2 + j*(CITIES+1)
//   MB(j)+CITIES                    length of that tour
//   CB = CITIES^2 + NUM_SA*(CITIES+1)
//                                   write: start temperature (starts annealing);
//                                   read: T while annealing, best length at the end
//   CB+1 .. CB+CITIES               best tour, read after done
// done rises when the result is ready. The per-module tried pulses are
// collected but not used by the schedule, which counts clocks rather than
// attempts; they are kept as observation points.
module tsp_anneal
  import rawcs_pkg::*;
#(
  parameter int unsigned CITIES        = 10,
  parameter int unsigned NUM_SA        = 4,
  parameter int unsigned DW            = 32,
  parameter int unsigned TRIES_PER_T   = 250,
  parameter int unsigned ACCEPTS_PER_T = 60,
  parameter int unsigned COOL_RATE     = 1,
  parameter int unsigned T_FINAL       = 1,
  parameter int unsigned TERMS         = 4,
  parameter int unsigned FRAC          = 0
) (
  input  logic               clk,
  input  logic               rst,
  input  host_req_t          req,
  output logic [HOST_DW-1:0] rdata,
  output logic               done,
  output logic               ev_cool,
  output logic               ev_early,
  output logic               ev_frozen
);

  localparam int unsigned CW     = $clog2(CITIES);
  localparam int unsigned IDX_W  = $clog2(CITIES * CITIES);
  localparam int unsigned CB     = CITIES * CITIES + NUM_SA * (CITIES + 1);

  logic              run;
  logic [DW-1:0]     temp;
  logic [NUM_SA-1:0] idle, tried, accepted, seeded;
  logic [IDX_W-1:0]  dreq  [NUM_SA];
  logic [DW-1:0]     dans  [NUM_SA];
  logic [DW-1:0]     cur_dist [NUM_SA];
  logic [CW-1:0]     orders   [NUM_SA][CITIES];

  dist_matrix #(.DW(DW), .CITIES(CITIES), .NPORTS(NUM_SA), .BASE(0)) u_dist (
    .clk, .req, .index(dreq), .dout(dans)
  );

  for (genvar j = 0; j < NUM_SA; j++) begin : g_sa
    logic          rv, rok, rnext;
    logic [30:0]   rraw;
    logic [CW-1:0] runi;

    subtractive_rand #(.SEED(-500 + 500 * j), .M(CITIES)) u_rand (
      .clk, .rst, .next(rnext), .valid(rv), .raw(rraw), .uniform(runi), .uniform_ok(rok),
      .seeded(seeded[j])
    );

    sim_anneal #(
      .CITIES(CITIES), .DW(DW), .BASE(CITIES * CITIES + j * (CITIES + 1)),
      .TERMS(TERMS), .FRAC(FRAC)
    ) u_sa (
      .clk, .rst, .req, .run, .temp,
      .idle(idle[j]), .tried(tried[j]), .accepted(accepted[j]),
      .dist_req(dreq[j]), .dist_in(dans[j]),
      .rnd_valid(rv), .rnd_raw(rraw), .rnd_uniform(runi), .rnd_ok(rok), .rnd_next(rnext),
      .cur_dist(cur_dist[j]), .order(orders[j])
    );
  end

  tsp_control #(
    .NUM_SA(NUM_SA), .CITIES(CITIES), .DW(DW), .TRIES_PER_T(TRIES_PER_T),
    .ACCEPTS_PER_T(ACCEPTS_PER_T), .COOL_RATE(COOL_RATE), .T_FINAL(T_FINAL), .BASE(CB)
  ) u_ctrl (
    .clk, .rst, .req, .rdata, .run, .temp, .ready(&seeded), .idle, .accepted, .cur_dist, .orders,
    .done, .ev_cool, .ev_early, .ev_frozen
  );

endmodule
