// Successive approximation register logic of the 8-bit SAR ADC of one sensor
// tile. The clock in which `start` is high is the sampling clock (`sample`
// high); the SAR then decides one bit per clock from the MSB down: the DAC code is the result so far with
// the trial bit set, and the bit is kept when the comparator says the input
// is at or above the DAC level (`cmp` high). `done` pulses with `result`
// valid BITS+1 clocks after the start clock; a new conversion may start in
// the clock in which `done` is high, so one sample takes BITS+1 = 9 clocks and
// 8 MS/s needs a 72 MHz ADC clock.
// The current-steering DAC and the comparator are analog and outside.
// The SAR principle and 8 bits follow the architecture; one bit per clock is
// this design's choice.
module sar_adc_ctrl #(
  parameter int unsigned BITS = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            cmp,
  output logic            sample,
  output logic [BITS-1:0] dac,
  output logic [BITS-1:0] result,
  output logic            done,
  output logic            busy
);
  typedef enum logic {S_IDLE, S_CONV} state_e;
  state_e                  st;
  logic [BITS-1:0]         trial, acc;

  assign sample = (st == S_IDLE) & start;
  assign dac    = acc | trial;
  assign busy   = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; trial <= '0; acc <= '0; result <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          acc   <= '0;
          trial <= {1'b1, {(BITS-1){1'b0}}};
          st    <= S_CONV;
        end
        S_CONV: begin
          if (cmp) acc <= acc | trial;
          trial <= trial >> 1;
          if (trial[0]) begin
            result <= cmp ? (acc | trial) : acc;
            done   <= 1'b1;
            st     <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
