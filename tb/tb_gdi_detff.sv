// Self-checking testbench for gdi_detff.
//
// The clock period is 10 time units. d is changed only 2 units after an edge
// (never at an edge), and after each edge q must equal the d that was present
// at that edge. Between edges d is changed again and q must not move. rst and
// set are checked to act without a clock edge, in both clock phases, and rst
// is checked to win over set. Counts rising-edge and falling-edge captures
// separately; each must happen.
module tb_gdi_detff;

  logic clk = 1'b0;
  logic rst, set, d, q;
  int checks   = 0;
  int failures = 0;
  int rise_caps = 0;
  int fall_caps = 0;

  gdi_detff dut (.clk(clk), .rst(rst), .set(set), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%0b expected %0b", what, $time, q, exp);
    end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    logic prev;
    rst = 1'b1; set = 1'b0; d = 1'b1;
    #3; check(1'b0, "reset while clk low");
    #4; check(1'b0, "reset while clk high");
    set = 1'b1;
    #1; check(1'b0, "reset wins over set");
    rst = 1'b0;
    #1; check(1'b1, "set without edge");
    set = 1'b0;
    prev = 1'b1;
    d = 1'b1;
    // Align to 2 units after a rising edge; q is still 1 (d was 1 at that edge).
    @(posedge clk); #2;
    check(1'b1, "capture first edge");
    for (int n = 0; n < 400; n++) begin
      // Now 2 units after an edge. Wiggle d mid-phase: q must hold.
      v = 1'($urandom_range(0, 1));
      d = ~v;
      #1; check(prev, "hold between edges");
      d = v;
      #1; check(prev, "hold between edges");
      #3; check(v, "capture at edge");  // the edge 2 units ago took v
      if (clk) rise_caps++; else fall_caps++;
      prev = v;
      if (n % 37 == 5) begin
        // Asynchronous reset and set in the middle of a phase.
        rst = 1'b1; #1; check(1'b0, "async reset");
        rst = 1'b0; set = 1'b1; #1; check(1'b1, "async set");
        set = 1'b0;
        #3; check(v, "capture after set");  // the edge 1 unit ago took d = v
        if (clk) rise_caps++; else fall_caps++;
      end
    end
    checks++;
    if (rise_caps == 0 || fall_caps == 0) begin
      failures++;
      $display("FAIL rising captures=%0d falling captures=%0d", rise_caps, fall_caps);
    end
    $display("rising-edge captures=%0d falling-edge captures=%0d", rise_caps, fall_caps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
