// tb_hls_bme680_data: checks the BME680 correction unit, which handles four
// data kinds in sequence, against the reference formulas: temperature,
// pressure, humidity (including its 0 and 100 %RH clamps) and gas resistance
// over all 16 gas ranges and range-switching errors, for random raw values
// and calibration sets near typical parts. Checks that each result is
// written to its own MMR register and the fixed latency.
module tb_hls_bme680_data;
  import tb_ref_pkg::*;

  localparam int LAT = 511;   // cycles from hs_start to done

  typedef int cal_t [21];

  logic clk = 1'b0, rst_n = 1'b0;
  logic hs_start = 1'b0, busy, done;
  logic [3:0] mmr_we;
  logic [3:0][31:0] mmr_wdata;
  logic [41:0][7:0] cd;
  logic [12:0][7:0] sd;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] got [4];
  int writes [4];
  int clamp_hi = 0, clamp_lo = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 4; i++) if (mmr_we[i]) begin got[i] = mmr_wdata[i]; writes[i]++; end
  end

  hls_bme680_data dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cal_t typical();
    cal_t c;
    c[C_T1] = 26059 + int'($urandom_range(0, 400)) - 200;
    c[C_T2] = 26325 + int'($urandom_range(0, 400)) - 200;
    c[C_T3] = 3;
    c[C_P1] = 36054 + int'($urandom_range(0, 400)) - 200;
    c[C_P2] = -10407 + int'($urandom_range(0, 200)) - 100;
    c[C_P3] = 88;   c[C_P4] = 7052 + int'($urandom_range(0, 200)) - 100;
    c[C_P5] = -36;  c[C_P6] = 30;  c[C_P7] = 41;
    c[C_P8] = -2853; c[C_P9] = -2950; c[C_P10] = 30;
    c[C_H1] = 814 + int'($urandom_range(0, 40)) - 20;
    c[C_H2] = 1003 + int'($urandom_range(0, 40)) - 20;
    c[C_H3] = 0; c[C_H4] = 45; c[C_H5] = 20; c[C_H6] = 120; c[C_H7] = -100;
    c[C_RSW] = int'($urandom_range(0, 15)) - 8;
    return c;
  endfunction

  // lay the constants out in register order (0x89.., 0xE1.., 0x04)
  task automatic pack(input cal_t c);
    for (int i = 0; i < 42; i++) cd[i] = 8'($urandom);
    {cd[2], cd[1]}   = 16'(c[C_T2]);   cd[3]  = 8'(c[C_T3]);
    {cd[6], cd[5]}   = 16'(c[C_P1]);   {cd[8], cd[7]} = 16'(c[C_P2]);  cd[9] = 8'(c[C_P3]);
    {cd[12], cd[11]} = 16'(c[C_P4]);   {cd[14], cd[13]} = 16'(c[C_P5]);
    cd[15] = 8'(c[C_P7]);  cd[16] = 8'(c[C_P6]);
    {cd[20], cd[19]} = 16'(c[C_P8]);   {cd[22], cd[21]} = 16'(c[C_P9]); cd[23] = 8'(c[C_P10]);
    cd[25] = 8'(c[C_H2] >> 4);
    cd[26] = {4'(c[C_H2]), 4'(c[C_H1])};
    cd[27] = 8'(c[C_H1] >> 4);
    cd[28] = 8'(c[C_H3]); cd[29] = 8'(c[C_H4]); cd[30] = 8'(c[C_H5]); cd[31] = 8'(c[C_H6]); cd[32] = 8'(c[C_H7]);
    {cd[34], cd[33]} = 16'(c[C_T1]);
    cd[41] = {4'(c[C_RSW]), 4'($urandom)};
  endtask

  task automatic run(input cal_t c, input int at, input int ap, input int ah,
                     input int ag, input int rng);
    int t_exp, p_exp, h_exp, tf, c0;
    int unsigned g_exp;
    pack(c);
    for (int i = 0; i < 13; i++) sd[i] = 8'($urandom);
    {sd[0], sd[1], sd[2][7:4]} = 20'(ap);
    {sd[3], sd[4], sd[5][7:4]} = 20'(at);
    {sd[6], sd[7]} = 16'(ah);
    {sd[11], sd[12][7:6]} = 10'(ag);
    sd[12][3:0] = 4'(rng);
    t_exp = bme680_temp(at, c, tf);
    p_exp = bme680_press(ap, tf, c);
    h_exp = bme680_hum(ah, tf, c);
    g_exp = bme680_gas(ag, rng, c[C_RSW]);
    if (h_exp == 100000) clamp_hi++;
    if (h_exp == 0) clamp_lo++;
    writes = '{0, 0, 0, 0};
    @(negedge clk) begin hs_start = 1'b1; c0 = cyc; end
    @(negedge clk) hs_start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);   // results written on the done edge are recorded one edge later
    check(cyc - c0 == LAT + 1, $sformatf("latency %0d", cyc - c0));
    check(writes[0] == 1 && writes[1] == 1 && writes[2] == 1 && writes[3] == 1, "one write per register");
    check(got[0] == t_exp, $sformatf("T %0d exp %0d", $signed(got[0]), t_exp));
    check(got[1] == p_exp, $sformatf("P %0d exp %0d", got[1], p_exp));
    check(got[2] == h_exp, $sformatf("H %0d exp %0d", got[2], h_exp));
    check(got[3] == g_exp, $sformatf("G %0d exp %0d (range %0d rsw %0d)", got[3], g_exp, rng, c[C_RSW]));
  endtask

  initial begin
    cd = '0; sd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 48; k++)
      run(typical(), 470000 + int'($urandom_range(0, 80000)), 350000 + int'($urandom_range(0, 100000)),
          18000 + int'($urandom_range(0, 30000)), int'($urandom_range(0, 1023)), k % 16);
    // humidity clamps
    run(typical(), 500000, 400000, 56000, 512, 3);
    run(typical(), 500000, 400000, 2000, 512, 3);
    check(clamp_hi > 0 && clamp_lo > 0, $sformatf("clamps exercised %0d/%0d", clamp_hi, clamp_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
