// subtractive_rand: lagged subtractive random number generator.
//
// This is the generator the annealing program draws its random numbers from:
// a table A[1..55] of 31-bit numbers in which a refill replaces A[i] by
// A[i] - A[i+31] for i = 1..24 and then A[i] - A[i-24] for i = 25..55, all
// modulo 2^31. Numbers are handed out from A[54] (A[55] after a refill) down
// to A[1], and the table is refilled when it runs out. Seeding from SEED fills
// the table along the index sequence 21, 42, 8, ... and then refills it seven
// times, exactly as the software seeding routine does, so the hardware
// produces the same sequence as the program. The algorithm and the seed
// follow the document; updating one table entry per clock is this design's
// choice (seeding takes 54 + 7*55 clocks after reset, a refill 55 clocks).
//
// Interface: seeded rises when seeding has finished and stays high;
// valid says raw holds a number; next (with valid) consumes it.
// uniform = raw mod M and uniform_ok implement the rejection step used to
// draw a city index: a number is usable as an index only if raw is below
// 2^31 - (2^31 mod M); otherwise the caller draws again.
module subtractive_rand #(
  parameter int          SEED = -1000,
  parameter int unsigned M    = 10,
  localparam int unsigned UW  = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          next,
  output logic          valid,
  output logic [30:0]   raw,
  output logic [UW-1:0] uniform,
  output logic          uniform_ok,
  output logic          seeded
);

  typedef enum logic [1:0] {R_SEED, R_FLIP, R_READY} rstate_t;

  localparam logic [31:0] TWO31   = 32'h8000_0000;
  localparam logic [31:0] LIMIT   = TWO31 - (TWO31 % 32'(M));

  logic [30:0] a [1:55];
  rstate_t     state;
  logic [5:0]  idx;        // seeding index, then refill index 1..55
  logic [5:0]  ptr;        // next number to hand out
  logic [2:0]  flips_left; // refills still to do
  logic        seeding;    // the refills in progress belong to seeding
  logic [30:0] prev, nxt, sd;

  // One step of the seeding loop, as combinational values.
  logic [30:0] nxt_a, sd_n, nxt_b;
  logic [5:0]  idx_n;
  always_comb begin
    nxt_a = prev - nxt;
    sd_n  = sd[0] ? (31'h4000_0000 + (sd >> 1)) : (sd >> 1);
    nxt_b = nxt_a - sd_n;
    idx_n = 6'((7'(idx) + 7'd21) % 7'd55);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= R_SEED;
      prev       <= 31'(SEED);
      sd         <= 31'(SEED);
      nxt        <= 31'd1;
      a[55]      <= 31'(SEED);
      idx        <= 6'd21;
      ptr        <= 6'd54;
      flips_left <= 3'd7;
      seeding    <= 1'b1;
    end else begin
      unique case (state)
        R_SEED: begin
          a[idx] <= nxt;
          prev   <= nxt;
          nxt    <= nxt_b;
          sd     <= sd_n;
          idx    <= idx_n;
          if (idx_n == 6'd0) begin
            state <= R_FLIP;
            idx   <= 6'd1;
          end
        end
        R_FLIP: begin
          if (idx <= 6'd24) a[idx] <= a[idx] - a[idx + 6'd31];
          else              a[idx] <= a[idx] - a[idx - 6'd24];
          if (idx == 6'd55) begin
            idx <= 6'd1;
            if (flips_left == 3'd1) begin
              state   <= R_READY;
              ptr     <= seeding ? 6'd54 : 6'd55;
              seeding <= 1'b0;
            end
            flips_left <= flips_left - 3'd1;
          end else begin
            idx <= idx + 6'd1;
          end
        end
        R_READY: begin
          if (next) begin
            if (ptr == 6'd1) begin
              state      <= R_FLIP;
              idx        <= 6'd1;
              flips_left <= 3'd1;
            end else begin
              ptr <= ptr - 6'd1;
            end
          end
        end
        default: state <= R_SEED;
      endcase
    end
  end

  assign valid      = (state == R_READY);
  assign seeded     = !seeding;
  assign raw        = a[ptr];
  assign uniform    = UW'(32'(raw) % 32'(M));
  assign uniform_ok = 32'(raw) < LIMIT;

endmodule
