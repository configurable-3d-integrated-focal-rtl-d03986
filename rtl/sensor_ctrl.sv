// Sensor interface controller of one tile (ADC clock domain). A conversion
// request from the associated processor arrives as a toggle (`start_tgl`,
// core clock domain) and is synchronised here. The controller then holds the
// pixel readout circuits in reset (`pix_rst`, RST_CYC clocks), lets them
// integrate, and scans the TILE x TILE pixels through the
// analog multiplexer (`pix_sel`), converting each with the SAR ADC and writing
// the code into the sensor buffer (`bw_en`, `bw_addr`, `bw_data`). After the
// last pixel `frame_done` pulses. Conversions run back to back: a scan takes
// TILE*TILE*(BITS+1) clocks (576 at 8 bits: 8 us at 72 MHz), within the 10 us
// frame time of the architecture.
// The integration length is set up with each request: `int_len` (core
// domain) is written together with the toggle and is stable when the toggle
// arrives here, so it is sampled then without a synchroniser of its own. A
// value of 0 selects the default INT_CYC clocks. A new request must not come
// before the previous one has been seen (three ADC clocks).
// Reset/integrate/read sequencing and the multiplexed ADC follow the
// architecture, as does setting up the integration with the start request;
// phase lengths, the set-up encoding and a global (all pixels at once) integration
// are this design's choices.
module sensor_ctrl #(
  parameter int unsigned TILE    = 8,
  parameter int unsigned RST_CYC = 4,
  parameter int unsigned INT_CYC = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start_tgl,
  input  logic [8:0]                   int_len,
  output logic                         pix_rst,
  output logic [$clog2(TILE*TILE)-1:0] pix_sel,
  output logic                         adc_sample,
  output logic [7:0]                   adc_dac,
  input  logic                         adc_cmp,
  output logic                         bw_en,
  output logic [$clog2(TILE*TILE)-1:0] bw_addr,
  output logic [7:0]                   bw_data,
  output logic                         frame_done,
  output logic                         busy
);
  typedef enum logic [2:0] {S_IDLE, S_RST, S_INT, S_CONV} state_e;
  state_e      st;
  logic [2:0]  sync;
  logic [15:0] cnt, int_lim;
  logic        adc_start, adc_done, adc_busy, first;
  logic [7:0]  adc_res;

  sar_adc_ctrl #(.BITS(8)) u_sar (
    .clk, .rst_n, .start(adc_start), .cmp(adc_cmp), .sample(adc_sample),
    .dac(adc_dac), .result(adc_res), .done(adc_done), .busy(adc_busy));

  assign pix_rst   = (st == S_RST);
  // first conversion from S_CONV entry, the others back to back on `done`
  assign adc_start = (st == S_CONV) && (first || (adc_done && pix_sel != '1));
  assign busy      = (st != S_IDLE);
  assign bw_en     = adc_done;
  assign bw_addr   = pix_sel;
  assign bw_data   = adc_res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0; st <= S_IDLE; cnt <= '0; pix_sel <= '0; frame_done <= 1'b0; first <= 1'b0;
      int_lim <= 16'(INT_CYC);
    end else begin
      sync       <= {sync[1:0], start_tgl};
      frame_done <= 1'b0;
      unique case (st)
        S_IDLE: if (sync[2] != sync[1]) begin
          st      <= S_RST;
          cnt     <= '0;
          int_lim <= (int_len == '0) ? 16'(INT_CYC) : 16'(int_len);
        end
        S_RST:  begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(RST_CYC - 1)) begin st <= S_INT; cnt <= '0; end
        end
        S_INT:  begin
          cnt <= cnt + 1'b1;
          if (cnt == int_lim - 1'b1) begin st <= S_CONV; pix_sel <= '0; first <= 1'b1; end
        end
        S_CONV: begin
          first <= 1'b0;
          if (adc_done) begin
            if (pix_sel == '1) begin
              st <= S_IDLE; frame_done <= 1'b1;
            end else
              pix_sel <= pix_sel + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
