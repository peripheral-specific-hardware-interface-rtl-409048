// bme280_model: behavioural model of a BME280 sensor's SPI slave (mode 0),
// for simulation only. It holds a 256-byte register file. A transaction
// begins when CS falls: the first byte is {rw, addr[6:0]} with rw = 1 for a
// read; reads return registers (addr|0x80), (addr|0x80)+1, ... while further
// bytes are clocked; a write stores the following bytes into (addr|0x80),
// +1, ... Writing ctrl_meas (0xF4) with forced mode starts a "conversion":
// status bit 3 (measuring) stays set for MEAS_POLLS status reads, after which
// the mode bits return to sleep. Calibration and raw data registers are
// loaded by the testbench through regs[]. It counts transactions and status
// reads that reported "measuring".
module bme280_model #(
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
  int         n_trans, n_busy_reads, n_writes;

  initial begin
    for (int i = 0; i < 256; i++) regs[i] = 8'h00;
    regs[8'hD0] = 8'h60;
    meas_left = 0; n_trans = 0; n_busy_reads = 0; n_writes = 0;
    miso = 1'b0; bitc = 0; bytec = 0; rd = 1'b0; addr = 8'h00;
    sh_in = 8'h00; sh_out = 8'h00;
  end

  function automatic logic [7:0] read_reg(input logic [7:0] a);
    if (a == 8'hF3) begin
      if (meas_left > 0) begin
        meas_left--;
        n_busy_reads++;
        return 8'h08;
      end
      return 8'h00;
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
        addr = {1'b1, sh_in[6:0]};
        if (rd) sh_out = read_reg(addr);
      end else if (rd) begin
        addr   = addr + 8'd1;
        sh_out = read_reg(addr);
      end else begin
        regs[addr] = sh_in;
        n_writes++;
        if (addr == 8'hF4 && sh_in[1:0] != 2'b00) meas_left = MEAS_POLLS;
        addr = {1'b1, addr[6:0] + 7'd1};
      end
      bytec++;
    end
  end

  // mode 0: next bit appears after the falling edge
  always @(negedge sck) if (!cs_n && bytec > 0 && rd) begin
    miso = sh_out[7];
    sh_out = {sh_out[6:0], 1'b0};
  end
endmodule
