// tsp_control: cooling schedule and result collection of the annealing engine.
//
// The host starts annealing by writing the initial temperature to address
// BASE. The module then holds run high and broadcasts the temperature T to
// all annealing modules. T stays for TRIES_PER_T*CITIES clocks and then drops
// by COOL_RATE (a linear schedule, which integer hardware can follow).
// Two rules of the annealing program end a temperature or the whole run early:
// when more than ACCEPTS_PER_T*CITIES swaps have been accepted at the current
// temperature (summed over all modules) T drops at once, and a temperature at
// which no swap at all was accepted ends the run. The run also ends when T
// would fall to T_FINAL or below. At the end the module drops run, waits until
// every annealing module is idle, picks the one with the shortest tour (the
// lowest-numbered one on a tie) and raises done.
//
// The clock count of a temperature only advances while ready is high (all
// random generators seeded), so a start right after reset does not lose the
// first temperature.
//
// Host view: reading BASE returns T while annealing and the best tour length
// once T has been cleared at the end; reading BASE+1+i returns city i of the
// best tour. Writing BASE again restarts annealing from the modules' current
// tours. Counting clocks per temperature, the T-else-length read and the
// linear decrement follow the document; the early-exit rules come from its
// software version; the address layout and the multiplexer that replaces the
// document's tri-state result bus are this design's choices.
module tsp_control
  import rawcs_pkg::*;
#(
  parameter int unsigned NUM_SA        = 4,
  parameter int unsigned CITIES        = 10,
  parameter int unsigned DW            = 32,
  parameter int unsigned TRIES_PER_T   = 250,
  parameter int unsigned ACCEPTS_PER_T = 60,
  parameter int unsigned COOL_RATE     = 1,
  parameter int unsigned T_FINAL       = 1,
  parameter int unsigned BASE          = 144,
  localparam int unsigned CW           = $clog2(CITIES),
  localparam int unsigned SW           = (NUM_SA > 1) ? $clog2(NUM_SA) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  host_req_t          req,
  output logic [HOST_DW-1:0] rdata,
  output logic               run,
  output logic [DW-1:0]      temp,
  input  logic               ready,
  input  logic [NUM_SA-1:0]  idle,
  input  logic [NUM_SA-1:0]  accepted,
  input  logic [DW-1:0]      cur_dist [NUM_SA],
  input  logic [CW-1:0]      orders   [NUM_SA][CITIES],
  output logic               done,
  // event strobes, one clock each (for observation)
  output logic               ev_cool,   // T lowered after a full period
  output logic               ev_early,  // T lowered early on too many accepts
  output logic               ev_frozen  // run ended: no accept at one T
);

  localparam int unsigned TICKS   = TRIES_PER_T * CITIES;
  localparam int unsigned ACC_MAX = ACCEPTS_PER_T * CITIES;

  typedef enum logic [2:0] {C_IDLE, C_ANNEAL, C_DRAIN, C_PICK, C_DONE} c_state_t;

  c_state_t       state;
  logic [31:0]    tick;
  logic [31:0]    acc_cnt, acc_next;
  logic [DW-1:0]  best_dist;
  logic [SW-1:0]  best_idx;
  logic           period_end, too_many, last_t;

  // Accepted swaps this clock, summed over modules.
  always_comb begin
    acc_next = acc_cnt;
    for (int s = 0; s < NUM_SA; s++) acc_next += 32'(accepted[s]);
  end

  assign period_end = ready && (tick == TICKS - 1);
  assign too_many   = (acc_next > ACC_MAX);
  assign last_t     = (temp <= DW'(T_FINAL + COOL_RATE));

  // Shortest tour among the modules.
  logic [DW-1:0] min_d;
  logic [SW-1:0] min_i;
  always_comb begin
    min_d = cur_dist[0];
    min_i = '0;
    for (int s = 1; s < NUM_SA; s++)
      if (cur_dist[s] < min_d) begin
        min_d = cur_dist[s];
        min_i = SW'(s);
      end
  end

  logic start;
  assign start = req.wr && (req.addr == HOST_AW'(BASE));

  assign ev_early  = (state == C_ANNEAL) && !start && too_many;
  assign ev_cool   = (state == C_ANNEAL) && !start && !too_many && period_end && (acc_next != 0) && !last_t;
  assign ev_frozen = (state == C_ANNEAL) && !start && !too_many && period_end && (acc_next == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_IDLE;
      temp      <= '0;
      tick      <= '0;
      acc_cnt   <= '0;
      best_dist <= '0;
      best_idx  <= '0;
    end else if (start) begin
      temp    <= req.wdata[DW-1:0];
      tick    <= '0;
      acc_cnt <= '0;
      state   <= (req.wdata[DW-1:0] > DW'(T_FINAL)) ? C_ANNEAL : C_DRAIN;
    end else begin
      unique case (state)
        C_IDLE: ;
        C_ANNEAL: begin
          if (too_many || period_end) begin
            tick    <= '0;
            acc_cnt <= '0;
            if ((!too_many && acc_next == 0) || last_t) begin
              temp  <= '0;
              state <= C_DRAIN;
            end else begin
              temp <= temp - DW'(COOL_RATE);
            end
          end else if (ready) begin
            tick    <= tick + 1;
            acc_cnt <= acc_next;
          end
        end
        C_DRAIN: begin
          temp <= '0;
          if (&idle) state <= C_PICK;
        end
        C_PICK: begin
          best_dist <= min_d;
          best_idx  <= min_i;
          state     <= C_DONE;
        end
        C_DONE: ;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign run  = (state == C_ANNEAL);
  assign done = (state == C_DONE);

  // Host read multiplexer.
  logic [HOST_AW-1:0] off;
  assign off = req.addr - HOST_AW'(BASE + 1);
  always_comb begin
    rdata = '0;
    if (req.addr == HOST_AW'(BASE))
      rdata = (temp != '0) ? HOST_DW'(temp) : HOST_DW'(best_dist);
    else if (req.addr > HOST_AW'(BASE) && off < HOST_AW'(CITIES))
      rdata = HOST_DW'(orders[best_idx][off[CW-1:0]]);
  end

endmodule
