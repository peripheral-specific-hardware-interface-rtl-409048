// hls_bme680_data: "HLS Data" of the BME680 interface. One correction unit
// processes all four kinds of data in sequence: temperature, pressure,
// humidity and gas resistance, writing each result into its own MMR data
// register as soon as it is ready (mmr_we[i], i = 0..3).
//
// Inputs (the raw bytes the Control Units collected):
//   cd[0..24]  registers 0x89..0xA1, cd[25..40] registers 0xE1..0xF0,
//   cd[41]     register 0x04 (range switching error in bits 7:4);
//   sd[0..12]  registers 0x1F..0x2B (pressure, temperature, humidity, gas).
// The arithmetic is the sensor vendor's integer compensation (the fixed-point
// formulas of its reference driver), evaluated one statement per state with
// a shared multi-cycle divider (seq_div) for the six divisions. Results:
//   DATA0 temperature 0.01 degC, DATA1 pressure Pa, DATA2 humidity
//   0.001 %RH clamped to 0..100000, DATA3 gas resistance in ohm.
// The two 16-entry gas-range constant tables are those of the vendor's
// formula. Timing: done pulses 511 cycles after hs_start.
// The schedule and the single shared divider are this design's choices.
module hls_bme680_data (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hs_start,
  input  logic [41:0][7:0]     cd,
  input  logic [12:0][7:0]     sd,
  output logic                 busy,
  output logic                 done,
  output logic [3:0]           mmr_we,
  output logic [3:0][31:0]     mmr_wdata
);

  typedef logic signed [63:0] s64_t;

  typedef enum logic [5:0] {
    S_IDLE,
    S_T1, S_T2, S_T3, S_T4,
    S_P1, S_P2, S_P3, S_P4, S_P5, S_P6, S_P7, S_P8, S_P9, S_P10, S_P11, S_P12, S_P13,
    S_H1, S_H2, S_H3, S_H4, S_H5, S_H6, S_H7, S_H8, S_H9, S_H10, S_H11, S_H12, S_H13,
    S_G1, S_G2, S_G3, S_G4,
    S_DIV
  } state_e;

  state_e state, ret;

  // ---------------- field extraction ----------------
  function automatic s64_t u8(input logic [7:0] b);  return s64_t'({56'd0, b}); endfunction
  function automatic s64_t s8(input logic [7:0] b);  return s64_t'(signed'(b)); endfunction
  function automatic s64_t u16(input logic [7:0] lo, input logic [7:0] hi);
    return s64_t'({48'd0, hi, lo});
  endfunction
  function automatic s64_t s16(input logic [7:0] lo, input logic [7:0] hi);
    return s64_t'(signed'({hi, lo}));
  endfunction

  // gas-range tables of the vendor's integer formula
  function automatic s64_t lut1(input logic [3:0] r);
    unique case (r)
      4'd5, 4'd13: return 64'sd2126008810;
      4'd7:        return 64'sd2130303777;
      4'd10:       return 64'sd2143188679;
      4'd11:       return 64'sd2136746228;
      default:     return 64'sd2147483647;
    endcase
  endfunction
  function automatic s64_t lut2(input logic [3:0] r);
    unique case (r)
      4'd0:  return 64'sd4096000000;
      4'd1:  return 64'sd2048000000;
      4'd2:  return 64'sd1024000000;
      4'd3:  return 64'sd512000000;
      4'd4:  return 64'sd255744255;
      4'd5:  return 64'sd127110228;
      4'd6:  return 64'sd64000000;
      4'd7:  return 64'sd32258064;
      4'd8:  return 64'sd16016016;
      4'd9:  return 64'sd8000000;
      4'd10: return 64'sd4000000;
      4'd11: return 64'sd2000000;
      4'd12: return 64'sd1000000;
      4'd13: return 64'sd500000;
      4'd14: return 64'sd250000;
      default: return 64'sd125000;
    endcase
  endfunction

  s64_t t1, t2, t3, p1, p2, p3, p4, p5, p6, p7, p8, p9, p10;
  s64_t h1, h2, h3, h4, h5, h6, h7, rsw;
  s64_t adc_t, adc_p, adc_h, adc_g;
  logic [3:0] g_range;

  always_comb begin
    t2  = s16(cd[1], cd[2]);    t3  = s8(cd[3]);
    p1  = u16(cd[5], cd[6]);    p2  = s16(cd[7], cd[8]);    p3 = s8(cd[9]);
    p4  = s16(cd[11], cd[12]);  p5  = s16(cd[13], cd[14]);
    p7  = s8(cd[15]);           p6  = s8(cd[16]);
    p8  = s16(cd[19], cd[20]);  p9  = s16(cd[21], cd[22]);  p10 = u8(cd[23]);
    h2  = s64_t'({52'd0, cd[25], cd[26][7:4]});
    h1  = s64_t'({52'd0, cd[27], cd[26][3:0]});
    h3  = s8(cd[28]);  h4 = s8(cd[29]);  h5 = s8(cd[30]);
    h6  = u8(cd[31]);  h7 = s8(cd[32]);
    t1  = u16(cd[33], cd[34]);
    rsw = s64_t'(signed'(cd[41][7:4]));
    adc_p = s64_t'({44'd0, sd[0], sd[1], sd[2][7:4]});
    adc_t = s64_t'({44'd0, sd[3], sd[4], sd[5][7:4]});
    adc_h = s64_t'({48'd0, sd[6], sd[7]});
    adc_g = s64_t'({54'd0, sd[11], sd[12][7:6]});
    g_range = sd[12][3:0];
  end

  // ---------------- datapath registers ----------------
  s64_t v1, v2, v3, v4, v5, v6, tf, ts, pc, d1, d2, d3;
  logic div_start, div_done, div_busy;
  s64_t div_num, div_den, div_q;

  function automatic s64_t i32(input s64_t x);  // C cast to int32_t
    return s64_t'(signed'(x[31:0]));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ret <= S_IDLE;
      v1 <= '0; v2 <= '0; v3 <= '0; v4 <= '0; v5 <= '0; v6 <= '0;
      tf <= '0; ts <= '0; pc <= '0; d1 <= '0; d2 <= '0; d3 <= '0;
      div_start <= 1'b0; div_num <= '0; div_den <= '0;
      done <= 1'b0; mmr_we <= '0; mmr_wdata <= '0;
    end else begin
      done      <= 1'b0;
      mmr_we    <= '0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (hs_start) state <= S_T1;
        // ---- temperature ----
        S_T1: begin v1 <= (adc_t >>> 3) - (t1 <<< 1); state <= S_T2; end
        S_T2: begin
          v2 <= (v1 * t2) >>> 11;
          v3 <= ((v1 >>> 1) * (v1 >>> 1)) >>> 12;
          state <= S_T3;
        end
        S_T3: begin v3 <= (v3 * (t3 <<< 4)) >>> 14; state <= S_T4; end
        S_T4: begin
          tf <= i32(v2 + v3);
          mmr_wdata[0] <= 32'(((i32(v2 + v3) * 5) + 128) >>> 8);
          mmr_we[0]    <= 1'b1;
          state <= S_P1;
        end
        // ---- pressure ----
        S_P1: begin v1 <= (tf >>> 1) - 64'sd64000; state <= S_P2; end
        S_P2: begin
          v2 <= ((((v1 >>> 2) * (v1 >>> 2)) >>> 11) * p6) >>> 2;
          state <= S_P3;
        end
        S_P3: begin v2 <= v2 + ((v1 * p5) <<< 1); state <= S_P4; end
        S_P4: begin v2 <= (v2 >>> 2) + (p4 <<< 16); state <= S_P5; end
        S_P5: begin
          v1 <= (((((v1 >>> 2) * (v1 >>> 2)) >>> 13) * (p3 <<< 5)) >>> 3) + ((p2 * v1) >>> 1);
          state <= S_P6;
        end
        S_P6: begin v1 <= v1 >>> 18; state <= S_P7; end
        S_P7: begin v1 <= ((64'sd32768 + v1) * p1) >>> 15; state <= S_P8; end
        S_P8: begin pc <= 64'sd1048576 - adc_p; state <= S_P9; end
        S_P9: begin pc <= i32((pc - (v2 >>> 12)) * 3125); state <= S_P10; end
        S_P10: begin
          div_num <= (pc >= (64'sd1 <<< 30)) ? pc : (pc <<< 1);
          div_den <= v1;
          ret     <= S_P11;
          state   <= S_DIV;
        end
        S_P11: begin
          pc <= i32((pc >= (64'sd1 <<< 30)) ? (div_q <<< 1) : div_q);
          state <= S_P12;
        end
        S_P12: begin
          v1 <= (p9 * (((pc >>> 3) * (pc >>> 3)) >>> 13)) >>> 12;
          v2 <= ((pc >>> 2) * p8) >>> 13;
          v3 <= ((pc >>> 8) * (pc >>> 8) * (pc >>> 8) * p10) >>> 17;
          state <= S_P13;
        end
        S_P13: begin
          mmr_wdata[1] <= 32'(pc + ((v1 + v2 + v3 + (p7 <<< 7)) >>> 4));
          mmr_we[1]    <= 1'b1;
          state <= S_H1;
        end
        // ---- humidity ----
        S_H1: begin
          ts      <= ((tf * 5) + 128) >>> 8;
          state   <= S_H2;
        end
        S_H2: begin
          div_num <= ts * h3; div_den <= 64'sd100; ret <= S_H3; state <= S_DIV;
        end
        S_H3: begin
          v1      <= (adc_h - (h1 * 16)) - (div_q >>> 1);
          div_num <= ts * h4; div_den <= 64'sd100; ret <= S_H4; state <= S_DIV;
        end
        S_H4: begin
          d1      <= div_q;
          div_num <= ts * h5; div_den <= 64'sd100; ret <= S_H5; state <= S_DIV;
        end
        S_H5: begin
          div_num <= (ts * div_q) >>> 6; div_den <= 64'sd100; ret <= S_H6; state <= S_DIV;
        end
        S_H6: begin
          d2    <= div_q;
          state <= S_H7;
        end
        S_H7: begin
          v2    <= (h2 * (d1 + d2 + (64'sd1 <<< 14))) >>> 10;
          state <= S_H8;
        end
        S_H8: begin
          v3      <= i32(v1 * v2);
          div_num <= ts * h7; div_den <= 64'sd100; ret <= S_H9; state <= S_DIV;
        end
        S_H9: begin
          v4    <= ((h6 <<< 7) + div_q) >>> 4;
          state <= S_H10;
        end
        S_H10: begin
          v5    <= ((v3 >>> 14) * (v3 >>> 14)) >>> 10;
          state <= S_H11;
        end
        S_H11: begin
          v6    <= (v4 * v5) >>> 1;
          state <= S_H12;
        end
        S_H12: begin
          d3    <= (((v3 + v6) >>> 10) * 1000) >>> 12;
          state <= S_H13;
        end
        S_H13: begin
          mmr_wdata[2] <= (d3 > 64'sd100000) ? 32'd100000 : (d3 < 0) ? 32'd0 : 32'(d3);
          mmr_we[2]    <= 1'b1;
          state <= S_G1;
        end
        // ---- gas resistance ----
        S_G1: begin
          v1    <= ((64'sd1340 + 5 * rsw) * lut1(g_range)) >>> 16;
          state <= S_G2;
        end
        S_G2: begin
          v2    <= ((adc_g <<< 15) - 64'sd16777216) + v1;
          v3    <= (lut2(g_range) * v1) >>> 9;
          state <= S_G3;
        end
        S_G3: begin
          div_num <= v3 + (v2 >>> 1); div_den <= v2; ret <= S_G4; state <= S_DIV;
        end
        S_G4: begin
          mmr_wdata[3] <= 32'(div_q);
          mmr_we[3]    <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        // ---- shared divider call: start, wait, return ----
        S_DIV: begin
          if (!div_busy && !div_start && !div_done) div_start <= 1'b1;
          if (div_done) state <= ret;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  seq_div #(.WIDTH(64)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  assign busy = (state != S_IDLE);

endmodule
