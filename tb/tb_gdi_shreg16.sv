// End-to-end testbench for gdi_shreg16 at its default size (16 bits as four
// 4-bit slices), no parameter overridden.
//
// Part 1, thermometer operation: with din = 1, after reset the register must
// hold k ones in its low bits after k clock edges and be full after exactly 16
// edges, which is 8 clock periods, because it shifts on both edges. Shifting
// left then empties it one bit per edge, again in 16 edges. A run of up and
// down moves follows, checking the thermometer level after every edge.
// Part 2, random traffic: random dir and din, occasional asynchronous rst and
// set, checked against a reference model after every edge.
// Inputs change 2 time units after an edge (period 10); q is compared 2 units
// after the next edge. Each mechanism is counted and must occur: right shift,
// left shift, rising-edge and falling-edge shifts, rst, set, a full and an
// empty register, and a '1' crossing a slice boundary in each direction.
module tb_gdi_shreg16;
  import gdi_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned SW = 4;

  logic         clk = 1'b0;
  logic         rst, set, dir, din;
  logic [N-1:0] q;
  logic [N-1:0] model;
  int checks   = 0;
  int failures = 0;
  int n_right = 0, n_left = 0, n_rise = 0, n_fall = 0, n_rst = 0, n_set = 0;
  int n_full = 0, n_empty = 0, n_cross_r = 0, n_cross_l = 0;
  int edges = 0;
  int level;

  gdi_shreg16 dut (.clk(clk), .rst(rst), .set(set), .dir(dir), .din(din), .q(q));

  always #5 clk = ~clk;

  // Reference model: an ideal register that moves at both clock edges.
  function automatic logic [N-1:0] shifted(input logic [N-1:0] cur, input logic d,
                                           input logic l);
    if (d == DIR_RIGHT) return {cur[N-2:0], l};
    else                return {FILL_RIGHT, cur[N-1:1]};
  endfunction

  // Thermometer code of a level: the low `lvl` bits set.
  function automatic logic [N-1:0] thermo(input int lvl);
    logic [N-1:0] t = '0;
    for (int i = 0; i < N; i++) t[i] = (i < lvl);
    return t;
  endfunction

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s at %0t: q=%b expected %b", what, $time, q, model);
    end
  endtask

  task automatic need(input int cnt, input string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // Advance to 2 units after the next edge, update and check the model.
  task automatic step(input string what);
    logic [N-1:0] prev_q = model;
    #5;
    edges++;
    model = shifted(model, dir, din);
    if (clk) n_rise++; else n_fall++;
    if (dir == DIR_RIGHT) n_right++; else n_left++;
    for (int b = SW; b < N; b += SW) begin
      if (dir == DIR_RIGHT && prev_q[b-1] && !prev_q[b]) n_cross_r++;
      if (dir == DIR_LEFT  && prev_q[b] && !prev_q[b-1]) n_cross_l++;
    end
    check(what);
    if (q == '1) n_full++;
    if (q == '0) n_empty++;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    rst = 1'b1; set = 1'b0; dir = DIR_RIGHT; din = FILL_LEFT;
    model = '0;
    #3; check("reset"); n_rst++;
    @(negedge clk); #2; rst = 1'b0;

    // Fill: k ones after k edges, full after N edges = N/2 clock periods.
    t0 = $time;
    for (int k = 1; k <= N; k++) begin
      step("fill");
      checks++;
      if (q !== thermo(k)) begin
        failures++;
        $display("FAIL level %0d expected after %0d edges, q=%b", k, k, q);
      end
      if (k < N && q == '1) begin
        failures++;
        $display("FAIL full too early, after %0d edges", k);
      end
    end
    checks++;
    if (q != '1 || ($time - t0) != N / 2 * 10) begin
      failures++;
      $display("FAIL full after %0t time units, expected %0d", $time - t0, N / 2 * 10);
    end

    // Drain: shifting left empties the register in N edges.
    dir = DIR_LEFT;
    for (int k = N - 1; k >= 0; k--) begin
      step("drain");
      checks++;
      if (q !== thermo(k)) begin
        failures++;
        $display("FAIL level %0d expected while draining, q=%b", k, q);
      end
    end

    // Up/down walk of the thermometer level, din = 1 throughout.
    level = 0;
    for (int n = 0; n < 600; n++) begin
      dir = 1'($urandom_range(0, 1));
      if (dir == DIR_RIGHT && level < N) level++;
      else if (dir == DIR_LEFT && level > 0) level--;
      step("up/down");
      checks++;
      if (q !== thermo(level)) begin
        failures++;
        $display("FAIL level %0d expected, q=%b", level, q);
      end
    end

    // Random traffic with asynchronous rst and set.
    for (int n = 0; n < 3000; n++) begin
      dir = 1'($urandom_range(0, 1));
      din = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 29) == 0) begin
        if ($urandom_range(0, 1) == 1) begin
          rst = 1'b1; model = '0; n_rst++;
        end else begin
          set = 1'b1; model = '1; n_set++;
        end
        #1; check("asynchronous rst/set");
        rst = 1'b0; set = 1'b0;
        #4;                     // 2 units after the next edge
        model = shifted(model, dir, din);
        edges++;
        if (clk) n_rise++; else n_fall++;
        if (dir == DIR_RIGHT) n_right++; else n_left++;
        check("shift after rst/set");
      end else begin
        step("random");
      end
    end

    need(n_right, "right shift");
    need(n_left, "left shift");
    need(n_rise, "rising-edge shift");
    need(n_fall, "falling-edge shift");
    need(n_rst, "reset");
    need(n_set, "set");
    need(n_full, "full register");
    need(n_empty, "empty register");
    need(n_cross_r, "'1' crossing a slice boundary to the right");
    need(n_cross_l, "'1' crossing a slice boundary to the left");
    $display("edges=%0d right=%0d left=%0d rising=%0d falling=%0d rst=%0d set=%0d",
             edges, n_right, n_left, n_rise, n_fall, n_rst, n_set);
    $display("full=%0d empty=%0d cross_right=%0d cross_left=%0d",
             n_full, n_empty, n_cross_r, n_cross_l);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
