// seq_div: unsigned restoring divider, one quotient bit per cycle.
//
// A pulse on start loads num and den; NW cycles later done pulses with
// quot = num / den (den = 0 gives all ones). busy is high in between and
// start is ignored while busy. Used to turn feature sums into means.
module seq_div #(
  parameter int unsigned NW = 21,
  parameter int unsigned DW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot
);
  logic [DW:0]             rem;
  logic [NW-1:0]           q;
  logic [DW-1:0]           d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]             trial;

  always_comb trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      q    <= '0;
      d    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          q    <= num;
          d    <= den;
          cnt  <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (trial >= {1'b0, d}) begin
          rem <= trial - {1'b0, d};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (32'(cnt) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
      end
    end
  end
endmodule
