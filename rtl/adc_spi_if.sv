// adc_spi_if: reads conversions from a 12-bit serial ADC of the AD7476A type
// (the converter on the PmodAD1 module) that digitises the loop-filter
// voltage.
//
// A conversion frame is: chip select low, 16 serial clock cycles, chip
// select high for a quiet time. The converter shifts out four leading zeros
// and then the 12-bit code MSB first; the first bit is valid after chip
// select falls and each later bit after a falling serial-clock edge. This
// interface samples `sdata` at the instant it drives the serial clock low,
// i.e. once per bit, 16 times per frame, and keeps the low 12 bits.
//
// Timing: each serial-clock half period is SCLK_HALF clk cycles (4 gives
// 12.5 MHz from 100 MHz); one frame takes (32 + QUIET_HALVES) * SCLK_HALF
// clk cycles, 136 at the defaults (about 735 kS/s). `code` is updated and
// `valid` pulses for one clk at the end of each frame; conversions run
// continuously after reset. The frame format follows the converter's data
// sheet; the serial clock rate, quiet time and idle-high clock are this
// design's choices.
module adc_spi_if
  import dpll_pkg::*;
#(
  parameter int unsigned SCLK_HALF    = 4,
  parameter int unsigned QUIET_HALVES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      cs_n,
  output logic      sclk,
  input  logic      sdata,
  output adc_code_t code,
  output logic      valid
);
  typedef enum logic {S_QUIET, S_CONV} state_t;

  localparam int unsigned HC_W = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;

  state_t          state;
  logic [HC_W-1:0] div_cnt;
  logic [5:0]      half;     // half-period index inside a state
  logic [ADC_W-1:0] sr;     // last 12 bits read; leading zeros shift out
  logic            tick;

  assign tick = (div_cnt == HC_W'(SCLK_HALF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_QUIET;
      div_cnt <= '0;
      half    <= '0;
      sr      <= '0;
      cs_n    <= 1'b1;
      sclk    <= 1'b1;
      code    <= '0;
      valid   <= 1'b0;
    end else begin
      valid   <= 1'b0;
      div_cnt <= tick ? '0 : div_cnt + HC_W'(1);
      if (tick) begin
        unique case (state)
          S_QUIET: begin
            if (half == 6'(QUIET_HALVES - 1)) begin
              half  <= '0;
              cs_n  <= 1'b0;
              state <= S_CONV;
            end else begin
              half <= half + 6'd1;
            end
          end
          S_CONV: begin
            if (!half[0]) begin
              // end of a high half: read the current bit, clock the next out
              sr   <= {sr[ADC_W-2:0], sdata};
              sclk <= 1'b0;
              half <= half + 6'd1;
            end else begin
              sclk <= 1'b1;
              if (half == 6'd31) begin
                half  <= '0;
                cs_n  <= 1'b1;
                code  <= sr;
                valid <= 1'b1;
                state <= S_QUIET;
              end else begin
                half <= half + 6'd1;
              end
            end
          end
          default: state <= S_QUIET;
        endcase
      end
    end
  end
endmodule
