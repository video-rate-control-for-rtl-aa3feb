// rc_divider: sequential unsigned divider shared by the rate control.
//
// The hardware rate control needs two divisions. Once per frame it finds the
// average overhead bits per MB (B_OH_bit / MBsInFrame). Once per MB it finds the
// texture target per remaining MB (B_text_bit / MBs left). The two never overlap,
// so, as the design calls for, they share this one divider. It is a radix-2
// restoring divider (this implementation's choice): one quotient bit per cycle.
//
// Interface: pulse `start` with dividend and divisor while `busy` is low. `busy`
// stays high for WIDTH cycles. `done` pulses for one cycle and `quotient` and
// `remainder` then hold until the next start. Latency from start to done is
// WIDTH+1 cycles. A zero divisor gives an all-ones quotient.
module rc_divider #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] q, d;
  logic [WIDTH:0]   r;
  logic [CW-1:0]    cnt;
  logic [WIDTH:0]   r_shift, r_sub;

  always_comb begin
    r_shift = {r[WIDTH-1:0], q[WIDTH-1]};
    r_sub   = r_shift - {1'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
      d    <= '0;
      r    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        q    <= dividend;
        d    <= divisor;
        r    <= '0;
        cnt  <= CW'(WIDTH);
      end else if (busy) begin
        if (r_sub[WIDTH]) begin
          r <= r_shift;
          q <= {q[WIDTH-2:0], 1'b0};
        end else begin
          r <= r_sub;
          q <= {q[WIDTH-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = r[WIDTH-1:0];

endmodule
