// bme680_model: behavioural model of a BME680 sensor's SPI slave (mode 0),
// for simulation only. The 256 registers are split into two 128-byte SPI
// pages; bit 4 of register 0x73 (spi_mem_page) selects which page a 7-bit SPI
// address reaches: page 0 = registers 0x80..0xFF, page 1 = 0x00..0x7F.
// Register 0x73 is reachable from both pages. The first byte of a
// transaction is {rw, addr[6:0]} with rw = 1 for read; reads and writes
// auto-increment. Writing ctrl_meas (0x74) with forced mode starts a
// "conversion": meas_status_0 (0x1D) reads without new_data (bit 7) for
// MEAS_POLLS reads, then with it. The testbench loads calibration and data
// registers through regs[] and reads n_busy_reads and page_switches.
module bme680_model #(
  parameter int MEAS_POLLS = 2
) (
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);
  logic [7:0] regs [256];
  logic [7:0] sh_in, sh_out;
  logic [7:0] addr;
  int         bitc, bytec;
  logic       rd;
  int         meas_left;
  int         n_trans, n_busy_reads, page_switches;

  initial begin
    for (int i = 0; i < 256; i++) regs[i] = 8'h00;
    regs[8'hD0] = 8'h61;
    meas_left = 0; n_trans = 0; n_busy_reads = 0; page_switches = 0;
    miso = 1'b0; bitc = 0; bytec = 0; rd = 1'b0; addr = 8'h00;
    sh_in = 8'h00; sh_out = 8'h00;
  end

  function automatic logic [7:0] map(input logic [6:0] a7);
    if (a7 == 7'h73) return 8'h73;
    return regs[8'h73][4] ? {1'b0, a7} : {1'b1, a7};
  endfunction

  function automatic logic [7:0] read_reg(input logic [7:0] a);
    if (a == 8'h1D) begin
      if (meas_left > 0) begin
        meas_left--;
        n_busy_reads++;
        return 8'h20;        // measuring
      end
      return 8'h80;          // new data
    end
    return regs[a];
  endfunction

  always @(negedge cs_n) begin
    bitc = 0; bytec = 0; n_trans++;
    miso = 1'b0;
  end

  always @(posedge sck) if (!cs_n) begin
    sh_in = {sh_in[6:0], mosi};
    bitc++;
    if (bitc == 8) begin
      bitc = 0;
      if (bytec == 0) begin
        rd   = sh_in[7];
        addr = map(sh_in[6:0]);
        if (rd) sh_out = read_reg(addr);
      end else if (rd) begin
        addr   = map(7'(addr[6:0] + 7'd1));
        sh_out = read_reg(addr);
      end else begin
        if (addr == 8'h73 && regs[8'h73][4] != sh_in[4]) page_switches++;
        regs[addr] = sh_in;
        if (addr == 8'h74 && sh_in[1:0] == 2'b01) meas_left = MEAS_POLLS;
        addr = map(7'(addr[6:0] + 7'd1));
      end
      bytec++;
    end
  end

  always @(negedge sck) if (!cs_n && bytec > 0 && rd) begin
    miso = sh_out[7];
    sh_out = {sh_out[6:0], 1'b0};
  end
endmodule
