// tb_ref_pkg: golden reference models for the testbenches. The sensor
// vendors' integer compensation formulas, written as straight-line code with
// C-like types (int = int32_t, longint = int64_t), independently of the
// clocked RTL schedules. Also helpers that lay calibration constants out in
// the sensors' register order.
package tb_ref_pkg;

  // ---------------- BME280 ----------------
  function automatic int bme280_temp(input int adc_t, input int t1, input int t2, input int t3,
                                     output int t_fine);
    int var1, var2;
    var1 = (((adc_t >>> 3) - (t1 <<< 1)) * t2) >>> 11;
    var2 = (((((adc_t >>> 4) - t1) * ((adc_t >>> 4) - t1)) >>> 12) * t3) >>> 14;
    t_fine = var1 + var2;
    return (t_fine * 5 + 128) >>> 8;
  endfunction

  function automatic int unsigned bme280_press(input int adc_p, input int t_fine,
      input longint p1, input longint p2, input longint p3, input longint p4, input longint p5,
      input longint p6, input longint p7, input longint p8, input longint p9);
    longint var1, var2, p;
    var1 = longint'(t_fine) - 128000;
    var2 = var1 * var1 * p6;
    var2 = var2 + ((var1 * p5) <<< 17);
    var2 = var2 + (p4 <<< 35);
    var1 = ((var1 * var1 * p3) >>> 8) + ((var1 * p2) <<< 12);
    var1 = (((longint'(1) <<< 47) + var1) * p1) >>> 33;
    if (var1 == 0) return 0;
    p = 1048576 - longint'(adc_p);
    p = (((p <<< 31) - var2) * 3125) / var1;
    var1 = (p9 * (p >>> 13) * (p >>> 13)) >>> 25;
    var2 = (p8 * p) >>> 19;
    p = ((p + var1 + var2) >>> 8) + (p7 <<< 4);
    return int'(p);
  endfunction

  // ---------------- BME680 ----------------
  // BME680 calibration constants, held in an int array at these indices
  localparam int C_T1 = 0;
  localparam int C_T2 = 1;
  localparam int C_T3 = 2;
  localparam int C_P1 = 3;
  localparam int C_P2 = 4;
  localparam int C_P3 = 5;
  localparam int C_P4 = 6;
  localparam int C_P5 = 7;
  localparam int C_P6 = 8;
  localparam int C_P7 = 9;
  localparam int C_P8 = 10;
  localparam int C_P9 = 11;
  localparam int C_P10 = 12;
  localparam int C_H1 = 13;
  localparam int C_H2 = 14;
  localparam int C_H3 = 15;
  localparam int C_H4 = 16;
  localparam int C_H5 = 17;
  localparam int C_H6 = 18;
  localparam int C_H7 = 19;
  localparam int C_RSW = 20;
  localparam int C_N = 21;

  function automatic int bme680_temp(input int adc, input int c [21], output int t_fine);
    int var1, var2, var3;
    var1 = (adc >>> 3) - (c[C_T1] <<< 1);
    var2 = (var1 * c[C_T2]) >>> 11;
    var3 = ((var1 >>> 1) * (var1 >>> 1)) >>> 12;
    var3 = (var3 * (c[C_T3] <<< 4)) >>> 14;
    t_fine = var2 + var3;
    return ((t_fine * 5) + 128) >>> 8;
  endfunction

  function automatic int bme680_press(input int adc, input int t_fine, input int c [21]);
    int var1, var2, var3, pc;
    var1 = (t_fine >>> 1) - 64000;
    var2 = ((((var1 >>> 2) * (var1 >>> 2)) >>> 11) * c[C_P6]) >>> 2;
    var2 = var2 + ((var1 * c[C_P5]) <<< 1);
    var2 = (var2 >>> 2) + (c[C_P4] <<< 16);
    var1 = (((((var1 >>> 2) * (var1 >>> 2)) >>> 13) * (c[C_P3] <<< 5)) >>> 3) + ((c[C_P2] * var1) >>> 1);
    var1 = var1 >>> 18;
    var1 = ((32768 + var1) * c[C_P1]) >>> 15;
    pc = 1048576 - adc;
    pc = int'(32'(pc - (var2 >>> 12)) * 32'd3125);
    if (pc >= (1 << 30)) pc = (pc / var1) <<< 1;
    else pc = (pc <<< 1) / var1;
    var1 = (c[C_P9] * (((pc >>> 3) * (pc >>> 3)) >>> 13)) >>> 12;
    var2 = ((pc >>> 2) * c[C_P8]) >>> 13;
    var3 = ((pc >>> 8) * (pc >>> 8) * (pc >>> 8) * c[C_P10]) >>> 17;
    return pc + ((var1 + var2 + var3 + (c[C_P7] <<< 7)) >>> 4);
  endfunction

  function automatic int bme680_hum(input int adc, input int t_fine, input int c [21]);
    int ts, var1, var2, var3, var4, var5, var6, h;
    ts   = ((t_fine * 5) + 128) >>> 8;
    var1 = (adc - (c[C_H1] * 16)) - (((ts * c[C_H3]) / 100) >>> 1);
    var2 = (c[C_H2] * (((ts * c[C_H4]) / 100) + (((ts * ((ts * c[C_H5]) / 100)) >>> 6) / 100) + (1 << 14))) >>> 10;
    var3 = var1 * var2;
    var4 = c[C_H6] <<< 7;
    var4 = (var4 + ((ts * c[C_H7]) / 100)) >>> 4;
    var5 = ((var3 >>> 14) * (var3 >>> 14)) >>> 10;
    var6 = (var4 * var5) >>> 1;
    h = (((var3 + var6) >>> 10) * 1000) >>> 12;
    if (h > 100000) h = 100000;
    else if (h < 0) h = 0;
    return h;
  endfunction

  function automatic longint lut1(input int r);
    case (r)
      5, 13: return 2126008810;
      7:     return 2130303777;
      10:    return 2143188679;
      11:    return 2136746228;
      default: return 2147483647;
    endcase
  endfunction
  function automatic longint lut2(input int r);
    longint t [16] = '{64'd4096000000, 64'd2048000000, 64'd1024000000, 64'd512000000, 64'd255744255, 64'd127110228,
                       64'd64000000, 64'd32258064, 64'd16016016, 64'd8000000, 64'd4000000, 64'd2000000, 64'd1000000,
                       64'd500000, 64'd250000, 64'd125000};
    return t[r];
  endfunction

  function automatic int unsigned bme680_gas(input int adc, input int range, input int rsw);
    longint var1, var2, var3;
    var1 = ((1340 + (5 * longint'(rsw))) * lut1(range)) >>> 16;
    var2 = ((longint'(adc) <<< 15) - 16777216) + var1;
    var3 = (lut2(range) * var1) >>> 9;
    if (var2 == 0) return 0;
    return int'((var3 + (var2 >>> 1)) / var2);
  endfunction

endpackage
