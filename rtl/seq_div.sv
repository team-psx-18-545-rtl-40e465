// seq_div: sequential signed divider, one quotient bit per cycle.
//
// Divides the NW-bit signed dividend by the DW-bit signed divisor by
// restoring division on the magnitudes, then applies the sign, so the
// quotient is truncated toward zero. A start pulse loads the operands; done
// pulses NW+1 cycles later with the quotient. A zero divisor yields zero.
module seq_div #(
  parameter int NW = 48,   // dividend and quotient width
  parameter int DW = 26    // divisor width
) (
  input  logic                 clk,       // clock
  input  logic                 rst_n,     // asynchronous reset, active low
  input  logic                 start,     // load operands and begin
  input  logic signed [NW-1:0] dividend,  // numerator
  input  logic signed [DW-1:0] divisor,   // denominator
  output logic                 done,      // quotient valid (one-cycle pulse)
  output logic signed [NW-1:0] quotient   // result, truncated toward zero
);
  logic [NW-1:0] q;       // magnitude of the dividend shifting into quotient bits
  logic [DW:0]   r;       // partial remainder
  logic [DW-1:0] d;       // divisor magnitude
  logic          neg, busy, dz;
  logic [$clog2(NW+1):0] cnt;
  logic [DW:0]   trial;

  assign trial = {r[DW-1:0], q[NW-1]} - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; r <= '0; d <= '0; neg <= 1'b0; busy <= 1'b0; dz <= 1'b0;
      cnt <= '0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend[NW-1] ? NW'(-dividend) : NW'(dividend);
        d    <= divisor[DW-1] ? DW'(-divisor) : DW'(divisor);
        dz   <= (divisor == '0);
        neg  <= dividend[NW-1] ^ divisor[DW-1];
        r    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (trial[DW]) begin
          r <= {r[DW-1:0], q[NW-1]};
          q <= {q[NW-2:0], 1'b0};
        end else begin
          r <= trial;
          q <= {q[NW-2:0], 1'b1};
        end
        cnt <= cnt + 1'b1;
        if (int'(cnt) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (busy && int'(cnt) == NW - 1) begin
        logic [NW-1:0] qf;
        qf = trial[DW] ? {q[NW-2:0], 1'b0} : {q[NW-2:0], 1'b1};
        quotient <= dz ? '0 : (neg ? -$signed(qf) : $signed(qf));
      end
    end
  end
endmodule
