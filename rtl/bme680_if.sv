// bme680_if: dedicated hardware interface for the BME680 gas, temperature,
// pressure and humidity sensor on SPI. It has the same three layers as
// bme280_if, but its HLS layer is a single correction unit (hls_bme680_data)
// that handles all four data kinds in sequence.
//   u_cal  selects SPI memory page 0, reads calibration blocks 0x89..0xA1
//          (25 bytes) and 0xE1..0xF0 (16 bytes), selects page 1 and reads
//          the range switching error (0x04);
//   u_cfg  selects page 1, writes ctrl_hum, the heater set point res_heat_0,
//          gas_wait_0, ctrl_gas_1 (run gas, heater profile 0) and ctrl_meas
//          (forced mode), then polls meas_status_0 until new data is flagged;
//   u_dat  reads the 13 data bytes 0x1F..0x2B.
// The BME680 SPI map has two 128-byte pages selected by bit 4 of register
// 0x73; the 7-bit address sent on SPI is the register address modulo 128.
// The sequencing matches bme280_if: a CPU write of CTRL[0] runs u_cal (first
// time or on CTRL[1] reload), u_cfg, u_dat, then the HLS unit, whose
// completion ends the acquisition. Results appear in MMR DATA0..DATA3.
// RES_HEAT and GAS_WAIT are raw register values: computing the heater
// resistance code from a target temperature is left to software.
// All register values and the sequencing are this design's choices.
module bme680_if
  import epoc_pkg::*;
#(
  parameter int unsigned SCK_HALF  = 5,
  parameter int unsigned CS_GAP    = 5,
  parameter logic [7:0]  CTRL_HUM  = 8'h01,
  parameter logic [7:0]  CTRL_MEAS = 8'h25,
  parameter logic [7:0]  RES_HEAT  = 8'h80,
  parameter logic [7:0]  GAS_WAIT  = 8'h59
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bus_we,
  input  logic [2:0]   bus_addr,
  input  logic [31:0]  bus_wdata,
  output logic [31:0]  bus_rdata,
  output logic         irq,
  output logic         spi_sck,
  output logic         spi_cs_n,
  output logic         spi_mosi,
  input  logic         spi_miso
);

  localparam ctrl_cmd_t PROG_CAL [6] = '{cmd_wr(8'h73, 8'h00),
                                         cmd_rd(8'h89, 8'd25, 8'd0),
                                         cmd_rd(8'hE1, 8'd16, 8'd25),
                                         cmd_wr(8'h73, 8'h10),
                                         cmd_rd(8'h04, 8'd1, 8'd41),
                                         cmd_end()};
  localparam ctrl_cmd_t PROG_CFG [8] = '{cmd_wr(8'h73, 8'h10),
                                         cmd_wr(8'h72, CTRL_HUM),
                                         cmd_wr(8'h5A, RES_HEAT),
                                         cmd_wr(8'h64, GAS_WAIT),
                                         cmd_wr(8'h71, 8'h10),
                                         cmd_wr(8'h74, CTRL_MEAS),
                                         cmd_poll(8'h1D, 8'h80, 8'h80),
                                         cmd_end()};
  localparam ctrl_cmd_t PROG_DAT [2] = '{cmd_rd(8'h1F, 8'd13, 8'd0), cmd_end()};

  typedef enum logic [2:0] {Q_IDLE, Q_CAL, Q_CFG, Q_DAT, Q_HLS} seq_e;
  seq_e seq;

  logic       start, reload_cal, acq_done, busy;
  logic       cal_valid;
  logic [2:0] cu_start, cu_busy, cu_done, cu_retry;
  comm_req_t  cu_req [3];
  comm_req_t  req;
  comm_rsp_t  rsp;
  logic [41:0][7:0] cd;
  logic [12:0][7:0] sd;
  logic [0:0][7:0]  cfg_rd;   // last status byte read by the poll
  logic       hs_start, h_busy, h_done;
  logic [MMR_NDATA-1:0]       hw_we;
  logic [MMR_NDATA-1:0][31:0] hw_wdata;
  logic       comm_busy;

  // ---------------- sequencer of the Control Units ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq       <= Q_IDLE;
      cu_start  <= '0;
      hs_start  <= 1'b0;
      cal_valid <= 1'b0;
      acq_done  <= 1'b0;
    end else begin
      cu_start <= '0;
      hs_start <= 1'b0;
      acq_done <= 1'b0;
      unique case (seq)
        Q_IDLE: if (start) begin
          if (!cal_valid || reload_cal) begin
            cu_start[0] <= 1'b1;
            seq         <= Q_CAL;
          end else begin
            cu_start[1] <= 1'b1;
            seq         <= Q_CFG;
          end
        end
        Q_CAL: if (cu_done[0]) begin
          cal_valid   <= 1'b1;
          cu_start[1] <= 1'b1;
          seq         <= Q_CFG;
        end
        Q_CFG: if (cu_done[1]) begin
          cu_start[2] <= 1'b1;
          seq         <= Q_DAT;
        end
        Q_DAT: if (cu_done[2]) begin
          hs_start <= 1'b1;
          seq      <= Q_HLS;
        end
        Q_HLS: if (h_done) begin
          acq_done <= 1'b1;
          seq      <= Q_IDLE;
        end
        default: seq <= Q_IDLE;
      endcase
    end
  end

  assign busy = (seq != Q_IDLE) || acq_done;   // until STATUS shows the result
  assign irq  = acq_done;

  // ---------------- Control Units ----------------
  ctrl_unit #(.NCMD(6), .BUF_BYTES(42), .PROG(PROG_CAL)) u_cal (
    .clk, .rst_n, .start(cu_start[0]), .busy(cu_busy[0]), .done(cu_done[0]),
    .poll_retry(cu_retry[0]), .req(cu_req[0]), .rsp, .rdata(cd));

  ctrl_unit #(.NCMD(8), .BUF_BYTES(1), .PROG(PROG_CFG)) u_cfg (
    .clk, .rst_n, .start(cu_start[1]), .busy(cu_busy[1]), .done(cu_done[1]),
    .poll_retry(cu_retry[1]), .req(cu_req[1]), .rsp, .rdata(cfg_rd));

  ctrl_unit #(.NCMD(2), .BUF_BYTES(13), .PROG(PROG_DAT)) u_dat (
    .clk, .rst_n, .start(cu_start[2]), .busy(cu_busy[2]), .done(cu_done[2]),
    .poll_retry(cu_retry[2]), .req(cu_req[2]), .rsp, .rdata(sd));

  // outputs of the Control Units are OR'ed, the input is shared
  assign req = cu_req[0] | cu_req[1] | cu_req[2];

  a_one_cu: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cu_busy));

  // ---------------- Comm Unit ----------------
  spi_comm_unit #(.SCK_HALF(SCK_HALF), .CS_GAP(CS_GAP)) u_comm (
    .clk, .rst_n, .req, .rsp, .busy(comm_busy),
    .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso);

  // ---------------- HLS layer ----------------
  hls_bme680_data u_data (
    .clk, .rst_n, .hs_start, .cd, .sd, .busy(h_busy), .done(h_done),
    .mmr_we(hw_we), .mmr_wdata(hw_wdata));

  // ---------------- MMR ----------------
  mmr #(.DEVICE_ID(DEV_BME680)) u_mmr (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata,
    .start, .reload_cal, .busy, .acq_done, .hw_we, .hw_wdata);

endmodule
