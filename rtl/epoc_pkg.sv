// epoc_pkg: types and constants shared by the peripheral-specific hardware
// interfaces (Comm Unit, Control Units, HLS-style correction units, MMR).
//
// comm_req_t / comm_rsp_t form the byte-level link between Control Units
// and the Comm Unit. Several Control Units drive the Comm Unit at once: an
// idle Control Unit drives all-zero requests, so their requests are combined
// by a bitwise OR, while the Comm Unit response is shared by all of them.
// ctrl_cmd_t is one entry of a Control Unit program (the "data necessary to
// realise a function": register address, write data or byte count).
// The MMR word offsets give every interface the same register layout:
// control and status registers with identical roles, then data registers
// holding only physical values (temperature, pressure, humidity, gas).
// The OR'ed request sharing and the uniform register roles follow the
// architecture; the field layouts, command encoding and addresses are this
// design's own.
package epoc_pkg;

  // ---------------- Comm Unit link ----------------
  typedef struct packed {
    logic       valid;  // a byte is to be transferred
    logic       last;   // release chip select after this byte
    logic [7:0] tx;     // byte sent on MOSI
  } comm_req_t;

  typedef struct packed {
    logic       done;   // one-cycle pulse: byte transfer finished
    logic [7:0] rx;     // byte received on MISO (valid with done)
  } comm_rsp_t;

  // ---------------- Control Unit program ----------------
  typedef enum logic [1:0] {
    CMD_END   = 2'd0,   // program finished
    CMD_WRITE = 2'd1,   // write one register: addr, arg = data
    CMD_READ  = 2'd2,   // burst read: addr, arg = byte count, dst = buffer index
    CMD_POLL  = 2'd3    // read addr until (byte & mask) == arg
  } ctrl_op_e;

  typedef struct packed {
    ctrl_op_e   op;
    logic [7:0] addr;   // 7-bit SPI register address in [6:0]
    logic [7:0] arg;
    logic [7:0] mask;
    logic [7:0] dst;
  } ctrl_cmd_t;

  function automatic ctrl_cmd_t cmd_wr(logic [7:0] addr, logic [7:0] data);
    return '{op: CMD_WRITE, addr: addr, arg: data, mask: 8'h00, dst: 8'h00};
  endfunction
  function automatic ctrl_cmd_t cmd_rd(logic [7:0] addr, logic [7:0] len, logic [7:0] dst);
    return '{op: CMD_READ, addr: addr, arg: len, mask: 8'h00, dst: dst};
  endfunction
  function automatic ctrl_cmd_t cmd_poll(logic [7:0] addr, logic [7:0] mask, logic [7:0] value);
    return '{op: CMD_POLL, addr: addr, arg: value, mask: mask, dst: 8'h00};
  endfunction
  function automatic ctrl_cmd_t cmd_end();
    return '{op: CMD_END, addr: 8'h00, arg: 8'h00, mask: 8'h00, dst: 8'h00};
  endfunction

  // ---------------- MMR layout (word index) ----------------
  localparam int unsigned MMR_WORDS   = 8;
  localparam int unsigned MMR_CTRL    = 0;  // [0] start (self clearing), [1] reload calibration
  localparam int unsigned MMR_STATUS  = 1;  // [0] busy, [1] data valid, [15:8] completed acquisitions
  localparam int unsigned MMR_DEVICE  = 2;  // [7:0] peripheral kind (read only)
  localparam int unsigned MMR_DATA0   = 4;  // temperature, 0.01 degC
  localparam int unsigned MMR_DATA1   = 5;  // pressure
  localparam int unsigned MMR_DATA2   = 6;  // humidity, 0.001 %RH
  localparam int unsigned MMR_DATA3   = 7;  // gas resistance, ohm
  localparam int unsigned MMR_NDATA   = 4;

  localparam logic [7:0] DEV_BME280 = 8'h60;  // the sensors' chip-id values
  localparam logic [7:0] DEV_BME680 = 8'h61;

endpackage
