// tb_push_switch_ctrl: presses the switch with contact bounce and short
// glitches and checks that each real press gives exactly one select pulse,
// no sooner than DEBOUNCE cycles after the switch settled, and that glitches
// shorter than DEBOUNCE give none.
module tb_push_switch_ctrl;
  localparam int unsigned DB = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sw_in, select;
  logic [15:0] presses;
  int pulses = 0;

  push_switch_ctrl #(.DEBOUNCE(DB)) dut (.*);

  always @(posedge clk) if (rst_n && select) pulses++;

  initial begin
    sw_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) begin
      int n_prev, t;
      n_prev = pulses;
      // glitch shorter than the debounce time
      @(negedge clk); sw_in = 1;
      repeat (DB / 2) @(negedge clk);
      sw_in = 0;
      repeat (3 * DB) @(negedge clk);
      checks++;
      if (pulses != n_prev) begin failures++; $display("FAIL glitch accepted"); end
      // bouncing press
      for (int b = 0; b < 4; b++) begin
        sw_in = 1; repeat ($urandom_range(1, 5)) @(negedge clk);
        sw_in = 0; repeat ($urandom_range(1, 5)) @(negedge clk);
      end
      sw_in = 1;
      t = 0;
      while (pulses == n_prev && t < 5 * DB) begin @(negedge clk); t++; end
      checks++;
      if (pulses != n_prev + 1 || t < DB || t > DB + 4) begin
        failures++; $display("FAIL press %0d: pulses %0d after %0d cycles", p, pulses - n_prev, t);
      end
      repeat (3 * DB) @(negedge clk);
      // bouncing release
      for (int b = 0; b < 3; b++) begin
        sw_in = 0; repeat ($urandom_range(1, 5)) @(negedge clk);
        sw_in = 1; repeat ($urandom_range(1, 5)) @(negedge clk);
      end
      sw_in = 0;
      repeat (3 * DB) @(negedge clk);
      checks++;
      if (pulses != n_prev + 1) begin failures++; $display("FAIL release gave a pulse"); end
    end
    checks++;
    if (presses != 16'(pulses) || pulses != 6) begin failures++; $display("FAIL presses %0d", presses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
