// sar_logic: successive-approximation register of the 10-bit ADC.
//
// A start pulse (the sampling instant) begins a conversion. The register
// first sets the MSB of the trial code; each following clock it reads the
// comparator: cmp = 1 means the held input is at or above the trial level,
// so the bit stays, otherwise it is cleared, and the next lower bit is set.
// After BITS decisions the code is final: done pulses for one clock and code
// holds the result, in offset binary (0 = lowest level) until the next
// conversion ends. trial drives the capacitor array (bn = trial, bb = ~trial).
// Timing: start at clock k, done at clock k + BITS.
// The document's converter is asynchronous; this one steps on the system
// clock, which leaves BITS + 1 of the 32 clocks of a slot for a conversion.
module sar_logic #(
  parameter int unsigned BITS = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            cmp,
  output logic [BITS-1:0] trial,
  output logic [BITS-1:0] code,
  output logic            busy,
  output logic            done
);
  logic [$clog2(BITS)-1:0] bit_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trial   <= '0;
      code    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      bit_idx <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        trial   <= BITS'(1) << (BITS - 1);
        bit_idx <= $clog2(BITS)'(BITS - 1);
        busy    <= 1'b1;
      end else if (busy) begin
        if (bit_idx == '0) begin
          code <= {trial[BITS-1:1], cmp};
          trial[0] <= cmp;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          trial[bit_idx]     <= cmp;
          trial[bit_idx - 1] <= 1'b1;
          bit_idx            <= bit_idx - 1'b1;
        end
      end
    end
  end

endmodule
