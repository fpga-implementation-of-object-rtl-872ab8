// push_switch_ctrl: turns the raw push switch into one select pulse per
// press, which steps the tracking target to another object.
//
// The switch input (active high) is synchronised with two flip-flops and
// must hold a new level for DEBOUNCE clock cycles before it is accepted
// (10 ms at the 12.27 MHz system clock by default). select pulses for one
// cycle when an accepted press begins; presses counts them.
// A push switch controller for choosing the target is the prototype's; the
// debouncing is this design's.
module push_switch_ctrl #(
  parameter int unsigned DEBOUNCE = 122_700
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sw_in,
  output logic        select,
  output logic [15:0] presses
);
  logic                          s1, s2, level;
  logic [$clog2(DEBOUNCE+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= 1'b0;
      s2      <= 1'b0;
      level   <= 1'b0;
      cnt     <= '0;
      select  <= 1'b0;
      presses <= '0;
    end else begin
      s1     <= sw_in;
      s2     <= s1;
      select <= 1'b0;
      if (s2 == level) begin
        cnt <= '0;
      end else if (32'(cnt) + 1 >= DEBOUNCE) begin
        cnt   <= '0;
        level <= s2;
        if (s2) begin
          select  <= 1'b1;
          presses <= presses + 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
