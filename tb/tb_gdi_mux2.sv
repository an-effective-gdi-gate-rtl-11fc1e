// Self-checking testbench for gdi_mux2: applies all eight input combinations
// and compares y with the selected input (a when s = 0, b when s = 1).
module tb_gdi_mux2;

  logic a, b, s, y;
  int checks   = 0;
  int failures = 0;

  gdi_mux2 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] v;
    logic exp_y;
    for (int i = 0; i < 8; i++) begin
      v = 3'(i);
      {s, b, a} = v;
      #1;
      exp_y = v[2] ? v[1] : v[0];
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s=%0b b=%0b a=%0b y=%0b expected %0b", s, b, a, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
