// Unsigned restoring divider, one quotient bit per cycle.
//
// start loads dividend and divisor; W cycles later done pulses for one cycle
// with quot = dividend / divisor. A zero divisor gives an all-ones quotient.
// busy is high from the cycle after start until done. Used by the bandwidth
// adaptation unit, which needs a few divisions once per sampling period and
// has no reason to spend a combinational divider on them.
module serial_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);

  logic [W-1:0]   q, d;
  logic [W:0]     rem;
  logic [$clog2(W+1)-1:0] n;

  wire [W:0] trial = {rem[W-1:0], q[W-1]};
  wire       fits  = trial >= {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; rem <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        d    <= divisor;
        rem  <= '0;
        n    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        rem <= fits ? trial - {1'b0, d} : trial;
        q   <= {q[W-2:0], fits};
        n   <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q;

endmodule
