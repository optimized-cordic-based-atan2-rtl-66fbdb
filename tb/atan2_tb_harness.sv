// atan2_tb_harness: stimulus generator and scoreboard for one atan2_cordic
// instance. It does not contain the operator; the testbench wires it to one.
//
// Stimulus, driven on the falling clock edge, one vector per cycle with
// random idle cycles in between:
//   1. directed vectors: the four axes, the diagonals, the extreme input
//      values and vectors just above/below the negative x axis;
//   2. every vector with |x|, |y| <= SMALL (small magnitudes are the hardest
//      case for the x/y word lengths);
//   3. NRAND random vectors over the full input range.
// (0, 0) is never sent, its angle being undefined.
//
// Checking: each result is compared with atan2(y, x) computed in floating
// point, expressed in turns and scaled by 2^W; the circular distance must be
// at most one LSB. The number of cycles between the capture of an input and
// the appearance of its result must equal CYC, and results must come back in
// order. The harness also counts the situations the operator has to handle
// (both pre-rotation directions, all four quadrants, angles that wrap past
// a full turn, back-to-back results, idle cycles inside the pipeline, the
// last only when CYC > 1) and
// counts a failure for any that never occurred.
module atan2_tb_harness #(
  parameter int W      = 16,
  parameter int CYC    = 17,
  parameter int NRAND  = 1000,
  parameter int SMALL  = 8,
  parameter int SEED   = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_valid,
  output logic [W-1:0] x_in,
  output logic [W-1:0] y_in,
  input  logic         out_valid,
  input  logic [W-1:0] z_out,
  output logic         done,
  output int           checks,
  output int           failures
);
  localparam real PI = 3.14159265358979323846;

  typedef struct {
    int     x;
    int     y;
    longint cyc;
  } req_t;

  req_t   stim[$];
  req_t   pend[$];
  longint cnt;
  int     sent, recv, total;
  real    max_err;
  int     n_yneg, n_ypos, n_wrap, n_b2b, n_gap;
  int     n_quad[4];
  bit     prev_out;
  bit     stim_done;

  function automatic int sx(input logic [W-1:0] v);
    return int'($signed(v));
  endfunction

  function automatic logic [W-1:0] tw(input int v);
    return W'(v);
  endfunction

  function automatic void add(input int x, input int y);
    req_t r;
    if (x == 0 && y == 0) return;
    r.x = x; r.y = y; r.cyc = 0;
    stim.push_back(r);
  endfunction

  initial begin
    int lo, hi;
    lo = -(1 << (W - 1));
    hi = (1 << (W - 1)) - 1;
    void'($urandom(SEED));
    // 1. directed
    add(1, 0); add(0, 1); add(-1, 0); add(0, -1);
    add(hi, 0); add(0, hi); add(lo, 0); add(0, lo);
    add(hi, hi); add(lo, lo); add(hi, lo); add(lo, hi);
    add(lo, 1); add(lo, -1); add(lo, 0); add(-1, 1); add(-1, -1);
    add(hi, 1); add(hi, -1); add(1, hi); add(-1, lo);
    for (int i = 1; i < 64; i++) begin
      add(lo + i, 1); add(lo + i, -1); add(-i, 1); add(-i, -1);
    end
    // 2. small magnitudes, exhaustively
    for (int x = -SMALL; x <= SMALL; x++)
      for (int y = -SMALL; y <= SMALL; y++)
        add(x, y);
    // 3. random
    for (int i = 0; i < NRAND; i++)
      add(sx(tw(int'($urandom))), sx(tw(int'($urandom))));
    total = stim.size();
  end

  // drive on the falling edge
  always @(negedge clk) begin
    if (!rst_n || stim.size() == 0 || ($urandom % 8) == 0) begin
      in_valid <= 1'b0;
      x_in     <= '0;
      y_in     <= '0;
      if (rst_n && pend.size() != 0) n_gap++;
    end else begin
      req_t r;
      r = stim.pop_front();
      r.cyc = cnt;
      pend.push_back(r);
      in_valid <= 1'b1;
      x_in     <= tw(r.x);
      y_in     <= tw(r.y);
      sent++;
    end
  end

  always @(posedge clk) cnt <= cnt + 1;

  // check on the falling edge, when the outputs are settled
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      req_t r;
      real  ref_t, e;
      if (pend.size() == 0) begin
        failures++;
        $display("ERROR: result without a pending request");
      end else begin
        r = pend.pop_front();
        ref_t = $atan2(real'(r.y), real'(r.x)) / (2.0 * PI);
        if (ref_t < 0.0) begin
          ref_t = ref_t + 1.0;
          n_wrap++;
        end
        ref_t = ref_t * (2.0 ** W);
        e = real'(z_out) - ref_t;
        if (e > (2.0 ** (W - 1))) e = e - (2.0 ** W);
        if (e < -(2.0 ** (W - 1))) e = e + (2.0 ** W);
        if (e < 0.0) e = -e;
        if (e > max_err) max_err = e;
        checks++;
        if (e > 1.0 + 1e-9) begin
          failures++;
          if (failures < 10)
            $display("ERROR: atan2(%0d, %0d): got %0d, exact %f (error %f LSB)",
                     r.y, r.x, z_out, ref_t, e);
        end
        checks++;
        if (cnt - r.cyc != longint'(CYC)) begin
          failures++;
          if (failures < 10)
            $display("ERROR: latency %0d, expected %0d", cnt - r.cyc, CYC);
        end
        if (r.y < 0) n_yneg++; else n_ypos++;
        n_quad[{r.y < 0, r.x < 0}]++;
        if (prev_out) n_b2b++;
        recv++;
      end
    end
    prev_out <= rst_n && out_valid;
  end

  assign stim_done = (recv == total) && (total > 0);

  initial begin
    in_valid = 1'b0; x_in = '0; y_in = '0;
    cnt = 0; sent = 0; recv = 0; checks = 0; failures = 0; max_err = 0.0;
    n_yneg = 0; n_ypos = 0; n_wrap = 0; n_b2b = 0; n_gap = 0; prev_out = 1'b0;
    n_quad = '{default: 0};
    done = 1'b0;
    wait (stim_done);
    repeat (CYC + 4) @(negedge clk);
    checks++;
    if (pend.size() != 0 || out_valid) begin
      failures++;
      $display("ERROR: stray results after the last request");
    end
    checks++;
    if (n_yneg == 0 || n_ypos == 0) begin
      failures++;
      $display("ERROR: a pre-rotation direction was never used");
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (n_quad[q] == 0) begin
        failures++;
        $display("ERROR: quadrant %0d never tested", q);
      end
    end
    checks++;
    if (n_wrap == 0 || n_b2b == 0 || (CYC > 1 && n_gap == 0)) begin
      failures++;
      $display("ERROR: wrap %0d, back-to-back %0d, idle %0d: one never happened",
               n_wrap, n_b2b, n_gap);
    end
    $display("W=%0d CYC=%0d: %0d results, max error %f LSB; y<0 %0d, y>=0 %0d, wraps %0d, back-to-back %0d, idle cycles in flight %0d",
             W, CYC, recv, max_err, n_yneg, n_ypos, n_wrap, n_b2b, n_gap);
    done = 1'b1;
  end
endmodule
