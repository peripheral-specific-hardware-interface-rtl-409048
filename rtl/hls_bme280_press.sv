// hls_bme280_press: "HLS Press" of the BME280 interface, the correction unit
// for pressure. It starts when HLS Temp hands over t_fine on the shared "hw"
// port (hw_valid), takes raw pressure from sd and the P1..P9 constants from
// cd, and evaluates the sensor data sheet's 64-bit integer formula, one
// statement per state; the single division uses the multi-cycle seq_div.
// Result: pressure in Pa as unsigned Q24.8 (value/256 = Pa), written into the
// MMR. A zero divisor gives 0, as the data sheet's formula does.
// Timing: done (with mmr_we) 77 cycles after hw_valid.
// The formula is the sensor vendor's; the schedule is this design's.
module hls_bme280_press (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hw_valid,
  input  logic signed [31:0]   hw_t_fine,
  input  logic [23:0][7:0]     cd,        // bytes 0x88..0x9F
  input  logic [5:0][7:0]      sd,        // bytes 0xF7..0xFC
  output logic                 busy,
  output logic                 done,
  output logic                 mmr_we,
  output logic [31:0]          mmr_wdata
);

  typedef enum logic [3:0] {S_IDLE, S_A, S_B, S_C, S_D, S_E, S_F, S_DIV, S_WAIT,
                            S_G, S_H} state_e;
  state_e state;

  logic signed [63:0] adc_p, p1, p2, p3, p4, p5, p6, p7, p8, p9;
  logic signed [63:0] tf, v1, v2, p;
  logic               div_start, div_busy, div_done;
  logic signed [63:0] div_num, div_q;

  function automatic logic signed [63:0] s16(input logic [7:0] lo, input logic [7:0] hi);
    return 64'(signed'({hi, lo}));
  endfunction

  always_comb begin
    adc_p = $signed({44'd0, sd[0], sd[1], sd[2][7:4]});
    p1 = $signed({48'd0, cd[7], cd[6]});
    p2 = s16(cd[8],  cd[9]);
    p3 = s16(cd[10], cd[11]);
    p4 = s16(cd[12], cd[13]);
    p5 = s16(cd[14], cd[15]);
    p6 = s16(cd[16], cd[17]);
    p7 = s16(cd[18], cd[19]);
    p8 = s16(cd[20], cd[21]);
    p9 = s16(cd[22], cd[23]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tf <= '0; v1 <= '0; v2 <= '0; p <= '0;
      div_start <= 1'b0; div_num <= '0;
      done <= 1'b0; mmr_we <= 1'b0; mmr_wdata <= '0;
    end else begin
      done      <= 1'b0;
      mmr_we    <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (hw_valid) begin
          tf    <= 64'(hw_t_fine);
          state <= S_A;
        end
        S_A: begin
          v1    <= tf - 64'sd128000;
          state <= S_B;
        end
        S_B: begin
          v2    <= v1 * v1 * p6 + ((v1 * p5) <<< 17);
          state <= S_C;
        end
        S_C: begin
          v2    <= v2 + (p4 <<< 35);
          v1    <= ((v1 * v1 * p3) >>> 8) + ((v1 * p2) <<< 12);
          state <= S_D;
        end
        S_D: begin
          v1    <= (((64'sd1 <<< 47) + v1) * p1) >>> 33;
          state <= S_E;
        end
        S_E: begin
          p     <= 64'sd1048576 - adc_p;
          state <= S_F;
        end
        S_F: begin
          if (v1 == 0) begin
            mmr_wdata <= '0;
            mmr_we    <= 1'b1;
            done      <= 1'b1;
            state     <= S_IDLE;
          end else begin
            div_num   <= ((p <<< 31) - v2) * 3125;
            state     <= S_DIV;
          end
        end
        S_DIV: begin
          div_start <= 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (div_done) begin
          p     <= div_q;
          state <= S_G;
        end
        S_G: begin
          v1    <= (p9 * (p >>> 13) * (p >>> 13)) >>> 25;
          v2    <= (p8 * p) >>> 19;
          state <= S_H;
        end
        S_H: begin
          mmr_wdata <= 32'(((p + v1 + v2) >>> 8) + (p7 <<< 4));
          mmr_we    <= 1'b1;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  seq_div #(.WIDTH(64)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(v1),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  assign busy = (state != S_IDLE);

endmodule
