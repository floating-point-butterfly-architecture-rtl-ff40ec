// Sequential shift-and-add multiplier.
//
// Multiplies two unsigned N-bit numbers by repeated addition: the multiplier
// B is scanned one digit per clock from its most significant bit to its
// least; each cycle the running product is doubled (shifted left one place)
// and the multiplicand A is added when the current digit of B is 1. After N
// cycles the accumulator holds A*B. One adder and one shifter are reused for
// every digit, which is the smallest multiplier in area and the slowest.
//
// Timing: a start pulse while idle loads the operands; the product appears
// on p with done high exactly N clock cycles after the start cycle, and
// stays on p until the next start. busy is high while a product is being
// formed; start is ignored while busy. Reset (rst_n, active-low,
// asynchronous) clears the controller and the product.
module shift_add_multiplier #(
  parameter int unsigned N = 24
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  typedef enum logic {IDLE, RUN} state_t;

  localparam int unsigned CW = $clog2(N + 1);

  state_t        state;
  logic [N-1:0]  a_q, b_q;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a_q   <= '0;
      b_q   <= '0;
      cnt   <= '0;
      p     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          p     <= '0;
          cnt   <= CW'(N);
          state <= RUN;
        end
        RUN: begin
          // MSB-first: double the partial product, add A if the digit is 1
          p   <= (p << 1) + (b_q[N-1] ? (2*N)'(a_q) : '0);
          b_q <= b_q << 1;
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  assign busy = (state == RUN);

endmodule
