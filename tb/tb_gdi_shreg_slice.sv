// Self-checking testbench for gdi_shreg_slice (4 bits, its default).
//
// A reference model in the testbench shifts a copy of the register at every
// clock edge, rising and falling: towards higher bits taking d_left when dir
// is DIR_RIGHT, towards lower bits taking d_right when dir is DIR_LEFT.
// Inputs change 2 time units after an edge (period 10) and q is compared with
// the model 2 units after the next edge. Random dir, d_left and d_right are
// mixed with occasional asynchronous rst and set. Each mechanism (right shift,
// left shift, capture on a rising and on a falling edge, rst, set) is counted
// and must occur.
module tb_gdi_shreg_slice;
  import gdi_pkg::*;

  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         rst, set, dir, d_left, d_right;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks   = 0;
  int failures = 0;
  int n_right = 0, n_left = 0, n_rise = 0, n_fall = 0, n_rst = 0, n_set = 0;

  gdi_shreg_slice dut (
    .clk(clk), .rst(rst), .set(set), .dir(dir),
    .d_left(d_left), .d_right(d_right), .q(q)
  );

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s at %0t: q=%b expected %b", what, $time, q, model);
    end
  endtask

  // One shift of the reference model.
  function automatic logic [W-1:0] shifted(input logic [W-1:0] cur, input logic d,
                                           input logic l, input logic r);
    if (d == DIR_RIGHT) return {cur[W-2:0], l};
    else                return {r, cur[W-1:1]};
  endfunction

  task automatic need(input int cnt, input string what);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; set = 1'b0; dir = DIR_RIGHT; d_left = FILL_LEFT; d_right = FILL_RIGHT;
    model = '0;
    #3; check("reset"); n_rst++;
    // Release reset between edges, at 2 units after the falling edge at 10.
    @(negedge clk); #2; rst = 1'b0;
    // Thermometer fill: with d_left = 1 the slice is full after W edges.
    for (int e = 1; e <= W; e++) begin
      #5; model = shifted(model, dir, d_left, d_right);
      check("fill");
      if (clk) n_rise++; else n_fall++;
      n_right++;
    end
    checks++;
    if (q != '1) begin
      failures++;
      $display("FAIL slice not full after %0d edges: %b", W, q);
    end
    // Random traffic.
    for (int n = 0; n < 2000; n++) begin
      dir     = 1'($urandom_range(0, 1));
      d_left  = 1'($urandom_range(0, 1));
      d_right = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 19) == 0) begin
        if ($urandom_range(0, 1) == 1) begin
          rst = 1'b1; model = '0; n_rst++;
        end else begin
          set = 1'b1; model = '1; n_set++;
        end
        #1; check("asynchronous rst/set");
        rst = 1'b0; set = 1'b0;
        #4;
      end else begin
        #5;
      end
      model = shifted(model, dir, d_left, d_right);
      check("shift");
      if (clk) n_rise++; else n_fall++;
      if (dir == DIR_RIGHT) n_right++; else n_left++;
    end
    need(n_right, "right shift");
    need(n_left, "left shift");
    need(n_rise, "rising-edge shift");
    need(n_fall, "falling-edge shift");
    need(n_rst, "reset");
    need(n_set, "set");
    $display("right=%0d left=%0d rising=%0d falling=%0d rst=%0d set=%0d",
             n_right, n_left, n_rise, n_fall, n_rst, n_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
