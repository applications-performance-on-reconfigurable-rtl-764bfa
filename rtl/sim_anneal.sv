// sim_anneal: one simulated-annealing module working on its own tour.
//
// The host loads a tour (CITIES words at BASE .. BASE+CITIES-1, city number
// per position) and its length (BASE+CITIES). While the control module holds
// run high the module repeats one swap attempt after another:
//   1. draw two tour positions p0, p1 from the random generator (numbers that
//      fail the generator's rejection test are drawn again); if p0 = p1, p1
//      becomes p0+3; pairs whose positions are too close to give six distinct
//      neighbour edges are drawn again, as in the software;
//   2. latch the cities A,B,C around p0 and D,E,F around p1;
//   3. send the eight distance requests AE, EC, DB, BF, AB, BC, DE, EF to the
//      distance matrix, one per clock (answers return one clock later);
//   4. form the energy change with the adder tree; a negative change is
//      accepted, otherwise X = -(change / T) (integer division) goes through
//      the exponential approximation and the swap is accepted if a fresh
//      31-bit random number, read as a fraction of 2^31, is below the result;
//   5. on acceptance swap the two cities and add the change to the length.
// An attempt takes 15 clocks at best (more when a number is rejected, a
// pair is redrawn or the generator is refilling its table).
// When run falls the module finishes the attempt in progress and then
// raises idle; cur_dist and order are its current tour, which the control
// module reads. tried / accepted pulse for one clock per attempt.
//
// The swap move, the eight-request sequence and the acceptance rule follow
// the document (the probabilistic acceptance with its integer series
// approximation comes from its experiments); the state encoding, the
// handshakes and the reset tour 0,1,..,CITIES-1 are this design's choices.
module sim_anneal
  import rawcs_pkg::*;
#(
  parameter int unsigned CITIES = 10,
  parameter int unsigned DW     = 32,
  parameter int unsigned BASE   = 100,
  parameter int unsigned TERMS  = 4,
  parameter int unsigned FRAC   = 0,
  parameter int unsigned XW     = 32,
  localparam int unsigned CW    = $clog2(CITIES),
  localparam int unsigned IDX_W = $clog2(CITIES * CITIES)
) (
  input  logic             clk,
  input  logic             rst,
  input  host_req_t        req,
  // control
  input  logic             run,
  input  logic [DW-1:0]    temp,
  output logic             idle,
  output logic             tried,
  output logic             accepted,
  // distance matrix port
  output logic [IDX_W-1:0] dist_req,
  input  logic [DW-1:0]    dist_in,
  // random generator
  input  logic             rnd_valid,
  input  logic [30:0]      rnd_raw,
  input  logic [CW-1:0]    rnd_uniform,
  input  logic             rnd_ok,
  output logic             rnd_next,
  // current tour
  output logic [DW-1:0]    cur_dist,
  output logic [CW-1:0]    order [CITIES]
);

  localparam int unsigned YW = 4 * XW;
  localparam logic [CW:0] NC = (CW+1)'(CITIES);

  typedef enum logic [3:0] {
    S_IDLE, S_PICK0, S_PICK1, S_CHECK, S_FETCH, S_REQ, S_DECIDE, S_COMMIT
  } sa_state_t;

  sa_state_t            state;
  logic [CW-1:0]        p0, p1;
  logic [CW-1:0]        ca, cb, cc, cd, ce, cf;
  logic [3:0]           k;
  logic [DW-1:0]        d [8];
  logic signed [DW+2:0] delta, delta_q;
  logic                 acc_q;

  // ---------------------------------------------------------------- helpers
  function automatic logic [CW-1:0] wrap_add(logic [CW-1:0] a, logic [CW:0] b);
    return CW'(((CW+1)'(a) + b) % NC);
  endfunction

  // Position-pair check of step 1.
  logic [CW-1:0] p1_fix;
  logic [CW:0]   on_path, not_on_path;
  logic          pair_ok;
  always_comb begin
    p1_fix      = (p0 == p1) ? wrap_add(p0, (CW+1)'(3)) : p1;
    on_path     = (CW+1)'(((CW+1)'(p1_fix) + NC - (CW+1)'(p0)) % NC) + 1'b1;
    not_on_path = NC - on_path;
    pair_ok     = (on_path >= 3) && (not_on_path >= 2);
  end

  // Distance request of step 3: index = first + CITIES * second.
  logic [CW-1:0] qa, qb;
  always_comb begin
    unique case (k[2:0])
      3'd0: begin qa = ca; qb = ce; end
      3'd1: begin qa = ce; qb = cc; end
      3'd2: begin qa = cd; qb = cb; end
      3'd3: begin qa = cb; qb = cf; end
      3'd4: begin qa = ca; qb = cb; end
      3'd5: begin qa = cb; qb = cc; end
      3'd6: begin qa = cd; qb = ce; end
      default: begin qa = ce; qb = cf; end
    endcase
    dist_req = IDX_W'(qa) + IDX_W'(qb) * IDX_W'(CITIES);
  end

  // Step 4: energy change and acceptance test.
  energy_change #(.DW(DW)) u_energy (.d(d), .delta(delta));

  // X = -(change / T), used only when change >= 0, so the division runs on
  // magnitudes and X is negated afterwards (saturated to XW bits).
  localparam int unsigned QW = DW + FRAC + 3;
  logic [QW-1:0]         mag;
  logic signed [XW-1:0]  x;
  logic signed [YW-1:0]  prob;
  logic signed [YW+32:0] lhs, rhs;
  logic                  prob_accept;
  always_comb begin
    mag = (temp == '0) ? '0 : (QW'(delta[DW+1:0]) << FRAC) / QW'(temp);
    if (mag >= (QW'(1) << (XW-1)))
      x = {1'b1, {(XW-1){1'b0}}};
    else
      x = -$signed(XW'(mag));
    lhs = $signed({{(YW+2-FRAC){1'b0}}, rnd_raw, {FRAC{1'b0}}});
    rhs = (YW+33)'(prob) <<< 31;
    prob_accept = (temp != '0) && (lhs < rhs);
  end

  exp_approx #(.XW(XW), .FRAC(FRAC), .TERMS(TERMS)) u_exp (.x(x), .y(prob));

  // ---------------------------------------------------------------- host writes
  logic [HOST_AW-1:0] off;
  logic               wr_order, wr_len;
  assign off      = req.addr - HOST_AW'(BASE);
  assign wr_order = req.wr && (req.addr >= HOST_AW'(BASE)) && (off < HOST_AW'(CITIES));
  assign wr_len   = req.wr && (req.addr == HOST_AW'(BASE + CITIES));

  // ---------------------------------------------------------------- control
  assign idle     = (state == S_IDLE);
  assign tried    = (state == S_COMMIT);
  assign accepted = (state == S_COMMIT) && acc_q;

  always_comb begin
    rnd_next = 1'b0;
    unique case (state)
      S_PICK0:  rnd_next = run && rnd_valid;
      S_PICK1:  rnd_next = rnd_valid;
      S_DECIDE: rnd_next = rnd_valid && (delta >= 0);
      default:  rnd_next = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cur_dist <= '0;
      k        <= '0;
      acc_q    <= 1'b0;
      p0       <= '0;
      p1       <= '0;
      for (int i = 0; i < CITIES; i++) order[i] <= CW'(i);
    end else begin
      unique case (state)
        S_IDLE:
          if (run) state <= S_PICK0;
        S_PICK0:
          if (!run)
            state <= S_IDLE;
          else if (rnd_valid && rnd_ok) begin
            p0    <= rnd_uniform;
            state <= S_PICK1;
          end
        S_PICK1:
          if (rnd_valid && rnd_ok) begin
            p1    <= rnd_uniform;
            state <= S_CHECK;
          end
        S_CHECK:
          if (pair_ok) begin
            p1    <= p1_fix;
            state <= S_FETCH;
          end else begin
            state <= S_PICK0;
          end
        S_FETCH: begin
          ca    <= order[wrap_add(p0, NC - 1'b1)];
          cb    <= order[p0];
          cc    <= order[wrap_add(p0, (CW+1)'(1))];
          cd    <= order[wrap_add(p1, NC - 1'b1)];
          ce    <= order[p1];
          cf    <= order[wrap_add(p1, (CW+1)'(1))];
          k     <= '0;
          state <= S_REQ;
        end
        S_REQ: begin
          if (k != 0) d[k-1] <= dist_in;
          k <= k + 1'b1;
          if (k == 4'd8) state <= S_DECIDE;
        end
        S_DECIDE:
          if (delta < 0) begin
            acc_q   <= 1'b1;
            delta_q <= delta;
            state   <= S_COMMIT;
          end else if (rnd_valid) begin
            acc_q   <= prob_accept;
            delta_q <= delta;
            state   <= S_COMMIT;
          end
        S_COMMIT: begin
          if (acc_q) begin
            order[p0] <= order[p1];
            order[p1] <= order[p0];
            cur_dist  <= cur_dist + DW'(delta_q);
          end
          state <= S_PICK0;
        end
        default: state <= S_IDLE;
      endcase

      // Host loading; the host writes only while the module is idle.
      if (wr_order) order[off[CW-1:0]] <= req.wdata[CW-1:0];
      if (wr_len)   cur_dist <= req.wdata[DW-1:0];
    end
  end

endmodule
