// ctrl_unit: a Control Unit. It holds the data one function of a peripheral
// interface needs (register addresses, values to write, numbers of bytes to
// read) as a small program, PROG, and when started it plays that program
// through the Comm Unit, collecting the bytes it reads into its buffer,
// rdata, from which the correction (HLS) units take raw sensor data and
// calibration data.
//
// Program entries (epoc_pkg::ctrl_cmd_t):
//   CMD_WRITE addr,arg      one SPI transaction: {0,addr[6:0]}, arg
//   CMD_READ  addr,len,dst  one SPI burst: {1,addr[6:0]}, then len dummy
//                           bytes; received bytes go to rdata[dst+i]
//   CMD_POLL  addr,mask,val read one byte until (byte & mask) == val
//   CMD_END                 pulse done and return to idle
// The register-address byte with the read/write flag in bit 7 is the SPI
// framing of the BME280/BME680 family.
//
// Several Control Units share one Comm Unit: while idle this unit drives an
// all-zero request, so requests of all units are combined by a bitwise OR,
// and the Comm Unit response is given to all of them. Only the started unit
// reacts to it. The program format and the OR'ed sharing rules (only one
// unit started at a time) are this design's reading of the architecture.
//
// Timing: start is a one-cycle pulse; done is a one-cycle pulse on the cycle
// after the last byte of the last transaction completes. rdata keeps its
// value until overwritten by a later run.
module ctrl_unit
  import epoc_pkg::*;
#(
  parameter int unsigned NCMD      = 2,
  parameter int unsigned BUF_BYTES = 1,
  parameter ctrl_cmd_t   PROG [NCMD] = '{'{op: CMD_READ, addr: 8'h50, arg: 8'd1, mask: 8'h00, dst: 8'h00},
                                         '{op: CMD_END,  addr: 8'h00, arg: 8'h00, mask: 8'h00, dst: 8'h00}}
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  output logic                           busy,
  output logic                           done,
  output logic                           poll_retry,  // pulse: a poll did not match
  output comm_req_t                      req,
  input  comm_rsp_t                      rsp,
  output logic [BUF_BYTES-1:0][7:0]      rdata
);

  localparam int unsigned PW = (NCMD > 1) ? $clog2(NCMD) : 1;

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_ADDR, S_DATA} state_e;

  state_e     state;
  logic [PW-1:0] pc;
  ctrl_cmd_t  cmd;
  logic [7:0] left;   // data bytes still to transfer after the current one
  logic [7:0] idx;    // buffer index of the current read byte

  assign cmd  = PROG[pc];
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pc         <= '0;
      left       <= '0;
      idx        <= '0;
      req        <= '0;
      done       <= 1'b0;
      poll_retry <= 1'b0;
      rdata      <= '0;
    end else begin
      done       <= 1'b0;
      poll_retry <= 1'b0;
      unique case (state)
        S_IDLE: begin
          req <= '0;
          if (start) begin
            pc    <= '0;
            state <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (cmd.op == CMD_END) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            req.valid <= 1'b1;
            req.last  <= 1'b0;
            req.tx    <= {cmd.op != CMD_WRITE, cmd.addr[6:0]};
            idx       <= cmd.dst;
            unique case (cmd.op)
              CMD_WRITE: left <= 8'd1;
              CMD_READ:  left <= cmd.arg;
              default:   left <= 8'd1;   // poll: one byte
            endcase
            state <= S_ADDR;
          end
        end
        S_ADDR: begin
          if (rsp.done) begin
            // address byte sent: first data byte
            req.valid <= 1'b1;
            req.last  <= (left == 8'd1);
            req.tx    <= (cmd.op == CMD_WRITE) ? cmd.arg : 8'h00;
            left      <= left - 8'd1;
            state     <= S_DATA;
          end
        end
        S_DATA: begin
          if (rsp.done) begin
            if (cmd.op == CMD_READ && idx < 8'(BUF_BYTES))
              rdata[idx[$clog2(BUF_BYTES+1)-1:0]] <= rsp.rx;
            idx <= idx + 8'd1;
            if (left != 8'd0) begin
              req.valid <= 1'b1;
              req.last  <= (left == 8'd1);
              req.tx    <= 8'h00;
              left      <= left - 8'd1;
            end else begin
              req <= '0;
              if (cmd.op == CMD_POLL && ((rsp.rx & cmd.mask) != cmd.arg))
                poll_retry <= 1'b1;        // same entry again
              else
                pc <= pc + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // an idle Control Unit must not disturb the OR'ed request bus
  a_idle_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                                  state == S_IDLE |-> !req.valid);

endmodule
