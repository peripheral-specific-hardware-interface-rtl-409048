// seq_div: multi-cycle signed integer divider shared by the correction units.
// It computes quot = num / den with the quotient truncated toward zero (the
// C semantics the correction formulas are written in), by restoring division
// of the magnitudes, one quotient bit per clock, and a final sign fix.
// A zero divisor gives quot = 0.
// Interface: pulse start with num and den valid; done pulses WIDTH+1 cycles
// later with quot valid; quot holds until the next start.
// The divider is this design's own: the architecture leaves the correction
// arithmetic to high-level synthesis, which would supply a divider of its own.
module seq_div #(
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [WIDTH-1:0]  num,
  input  logic signed [WIDTH-1:0]  den,
  output logic                     busy,
  output logic                     done,
  output logic signed [WIDTH-1:0]  quot
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] a_q, b_q, q_q;
  logic [WIDTH:0]   r_q;
  logic             neg_q, zero_q;
  logic [CW-1:0]    cnt;
  logic [WIDTH:0]   r_sh, r_sub;

  assign r_sh  = {r_q[WIDTH-1:0], a_q[WIDTH-1]};
  assign r_sub = r_sh - {1'b0, b_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; q_q <= '0; r_q <= '0;
      neg_q <= 1'b0; zero_q <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q    <= num[WIDTH-1] ? WIDTH'(-num) : num;
        b_q    <= den[WIDTH-1] ? WIDTH'(-den) : den;
        neg_q  <= num[WIDTH-1] ^ den[WIDTH-1];
        zero_q <= (den == '0);
        r_q    <= '0;
        q_q    <= '0;
        cnt    <= CW'(WIDTH);
        busy   <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          a_q <= {a_q[WIDTH-2:0], 1'b0};
          if (!r_sub[WIDTH]) begin
            r_q <= r_sub;
            q_q <= {q_q[WIDTH-2:0], 1'b1};
          end else begin
            r_q <= r_sh;
            q_q <= {q_q[WIDTH-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= zero_q ? '0 : (neg_q ? WIDTH'(-q_q) : q_q);
        end
      end
    end
  end

endmodule
