// spi_comm_unit: the Comm Unit, the part of a peripheral interface that
// actually talks to the peripheral. It is an SPI master in mode 0 (SCK idle
// low, MOSI changes on the falling edge, MISO sampled on the rising edge),
// the mode that both BME280 and BME680 accept.
//
// Interface: a Control Unit presents req.valid with a byte in req.tx. The
// unit pulls CS low (if not already low), shifts the byte out MSB first while
// shifting the peripheral's answer in, and pulses rsp.done for one cycle with
// the received byte in rsp.rx. If req.last was set with the byte, CS is
// released after it; otherwise CS stays low and the next byte of the same
// SPI transaction is accepted once rsp.done has fallen, so a requester that
// updates req on the cycle it sees rsp.done is never read half-way.
//
// Timing: SCK_HALF system clocks per SCK half period. The default 5 gives a
// 10 MHz SCK from a 100 MHz clock, the two frequencies used in the reference
// implementation. A byte takes 16*SCK_HALF cycles from acceptance to
// rsp.done (80 cycles at the default); back-to-back bytes of a burst add two
// cycles each. After CS rises it stays high for at least CS_GAP cycles.
// The mode and the CS timing are choices of this design.
module spi_comm_unit
  import epoc_pkg::*;
#(
  parameter int unsigned SCK_HALF = 5,
  parameter int unsigned CS_GAP   = 5
) (
  input  logic      clk,
  input  logic      rst_n,
  input  comm_req_t req,
  output comm_rsp_t rsp,
  output logic      busy,     // a transaction (CS low) is in progress
  output logic      spi_sck,
  output logic      spi_cs_n,
  output logic      spi_mosi,
  input  logic      spi_miso
);

  typedef enum logic [2:0] {S_IDLE, S_LOW, S_HIGH, S_WAIT, S_TAIL, S_GAP} state_e;

  localparam int unsigned CW = $clog2(SCK_HALF + CS_GAP + 1);

  state_e         state;
  logic [CW-1:0]  cnt;
  logic [2:0]     bitn;
  logic [7:0]     sh_tx, sh_rx;
  logic           last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      bitn     <= '0;
      sh_tx    <= '0;
      sh_rx    <= '0;
      last_q   <= 1'b0;
      spi_sck  <= 1'b0;
      spi_cs_n <= 1'b1;
      rsp      <= '0;
    end else begin
      rsp.done <= 1'b0;
      unique case (state)
        S_IDLE, S_WAIT: begin
          // while rsp.done is high the requester is still updating req
          if (req.valid && !rsp.done) begin
            spi_cs_n <= 1'b0;
            sh_tx    <= req.tx;
            last_q   <= req.last;
            bitn     <= '0;
            cnt      <= '0;
            state    <= S_LOW;
          end
        end
        S_LOW: begin
          if (cnt == CW'(SCK_HALF - 1)) begin
            cnt     <= '0;
            spi_sck <= 1'b1;
            sh_rx   <= {sh_rx[6:0], spi_miso};
            state   <= S_HIGH;
          end else cnt <= cnt + 1'b1;
        end
        S_HIGH: begin
          if (cnt == CW'(SCK_HALF - 1)) begin
            cnt     <= '0;
            spi_sck <= 1'b0;
            if (bitn == 3'd7) begin
              rsp.done <= 1'b1;
              rsp.rx   <= sh_rx;
              state    <= last_q ? S_TAIL : S_WAIT;
            end else begin
              bitn  <= bitn + 1'b1;
              sh_tx <= {sh_tx[6:0], 1'b0};
              state <= S_LOW;
            end
          end else cnt <= cnt + 1'b1;
        end
        S_TAIL: begin
          // CS hold time after the last SCK edge
          if (cnt == CW'(SCK_HALF - 1)) begin
            cnt      <= '0;
            spi_cs_n <= 1'b1;
            state    <= S_GAP;
          end else cnt <= cnt + 1'b1;
        end
        S_GAP: begin
          if (cnt >= CW'(CS_GAP - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign spi_mosi = sh_tx[7] & ~spi_cs_n;
  assign busy     = (state != S_IDLE);

endmodule
