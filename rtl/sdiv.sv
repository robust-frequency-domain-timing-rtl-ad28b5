// Sequential signed divider: quot = num / den, rounded toward zero.
//
// Used for the divisions of the estimators (by the regression's sum of
// squares, the symbol interval, delta_f). A start pulse latches the operands;
// the restoring algorithm then produces one quotient bit per clock, and done
// pulses NW+1 clocks after start with quot valid until the next start.
// den must be positive; den = 0 gives the all-ones magnitude. An immediate
// assertion flags a start that arrives while busy.
//
// A helper of this design; the document gives no divider circuit.
module sdiv #(
  parameter int NW = 32,     // numerator and quotient width
  parameter int DW = 16      // denominator width (unsigned)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quot
);
  logic [NW-1:0]  q;          // dividend shifting out, quotient shifting in
  logic [DW-1:0]  rem;
  logic [DW-1:0]  d;
  logic           neg;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]    trial;

  always_comb trial = {rem[DW-1:0], q[NW-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quot <= '0;
      q <= '0; rem <= '0; d <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        q    <= num[NW-1] ? NW'(-num) : NW'(num);
        neg  <= num[NW-1];
        d    <= den;
        rem  <= '0;
        cnt  <= '0;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], q[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(NW+1))'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= neg ? -$signed(q_next()) : $signed(q_next());
        end
      end
    end
  end

  // quotient register as it will be after this cycle's step
  function automatic logic [NW-1:0] q_next();
    return {q[NW-2:0], ~trial[DW]};
  endfunction

  // a new division may only start once the previous one is done
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else if (start) begin
      a_no_restart: assert (!busy) else $error("sdiv: start while busy");
    end
  end
endmodule
