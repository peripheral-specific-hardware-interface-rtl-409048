// hls_bme280_temp: "HLS Temp" of the BME280 interface, the correction unit for
// temperature. It waits on the handshake (hs_start) that says the Control
// Units have read the raw sensor data (sd, burst from register 0xF7) and the
// calibration data (cd, burst from 0x88), then computes the compensated
// temperature with the integer formula of the sensor's data sheet, one
// statement per clock as a high-level-synthesis schedule would:
//   var1   = ((adc_T>>3) - (T1<<1)) * T2 >> 11
//   var2   = (((adc_T>>4) - T1)^2 >> 12) * T3 >> 14
//   t_fine = var1 + var2 ;  T = (t_fine*5 + 128) >> 8   [0.01 degC]
// T is written into the MMR (mmr_we/mmr_wdata). t_fine is passed to HLS Press
// on the shared "hw" port (hw_valid pulse with hw_t_fine), which is how the
// two separately built correction units are connected.
// Timing: done pulses 5 cycles after hs_start, together with mmr_we and
// hw_valid. The formula is the sensor vendor's; the schedule is this design's.
module hls_bme280_temp (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hs_start,
  input  logic [23:0][7:0]     cd,        // bytes 0x88..0x9F
  input  logic [5:0][7:0]      sd,        // bytes 0xF7..0xFC
  output logic                 busy,
  output logic                 done,
  output logic                 hw_valid,
  output logic signed [31:0]   hw_t_fine,
  output logic                 mmr_we,
  output logic [31:0]          mmr_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_V1, S_V2, S_V3, S_OUT} state_e;
  state_e state;

  logic signed [63:0] adc_t, t1, t2, t3, v1, v2, tf;

  always_comb begin
    adc_t = $signed({44'd0, sd[3], sd[4], sd[5][7:4]});
    t1    = $signed({48'd0, cd[1], cd[0]});
    t2    = 64'(signed'({cd[3], cd[2]}));
    t3    = 64'(signed'({cd[5], cd[4]}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      v1 <= '0; v2 <= '0; tf <= '0;
      done <= 1'b0; hw_valid <= 1'b0; hw_t_fine <= '0;
      mmr_we <= 1'b0; mmr_wdata <= '0;
    end else begin
      done     <= 1'b0;
      hw_valid <= 1'b0;
      mmr_we   <= 1'b0;
      unique case (state)
        S_IDLE: if (hs_start) state <= S_V1;
        S_V1: begin
          v1    <= (((adc_t >>> 3) - (t1 <<< 1)) * t2) >>> 11;
          v2    <= ((adc_t >>> 4) - t1) * ((adc_t >>> 4) - t1);
          state <= S_V2;
        end
        S_V2: begin
          v2    <= ((v2 >>> 12) * t3) >>> 14;
          state <= S_V3;
        end
        S_V3: begin
          tf    <= 64'(signed'(32'(v1 + v2)));
          state <= S_OUT;
        end
        S_OUT: begin
          hw_t_fine <= tf[31:0];
          hw_valid  <= 1'b1;
          mmr_wdata <= 32'((tf * 5 + 128) >>> 8);
          mmr_we    <= 1'b1;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
