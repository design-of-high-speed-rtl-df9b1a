// booth_radix2_mult: sequential radix-2 Booth multiplier for signed operands.
//
// How it works. The classic A/Q/Q-1 register machine: A (the accumulator)
// and Q-1 start at zero, Q holds the multiplier and M the multiplicand. Each
// clock the pair {Q[0], Q-1} is examined: 01 adds M to A, 10 subtracts M from
// A, 00 and 11 leave A alone. Then {A, Q, Q-1} is shifted right by one place
// arithmetically (the sign of A is kept). After WIDTH steps the 2*WIDTH-bit
// product is {A, Q}. A and M carry one guard bit beyond WIDTH so that the
// most negative multiplicand cannot overflow the accumulator.
//
// Interface and timing. 'start' is accepted whenever busy is low; the
// operands are captured on that edge. The WIDTH add/shift steps follow on
// the next WIDTH edges; on the last of them 'done' rises for one cycle and
// 'product' becomes valid, staying valid until the next start. Reset is
// asynchronous, active low.
//
// From the document: the A, Q and Q-1 registers, the test of each bit
// together with the bit to its right, n shifts for an n-bit multiplier, and
// the 8-bit default width. This design's choices: the guard bit, one step per
// clock, and the start/busy/done handshake.
module booth_radix2_mult
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic                 busy,
  output logic                 done,
  output logic [2*WIDTH-1:0]   product
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  seq_state_t       state;
  logic [WIDTH:0]   acc;    // A, with a guard bit
  logic [WIDTH:0]   mcand;  // M, sign-extended by one bit
  logic [WIDTH-1:0] q;      // Q
  logic             q_m1;   // Q-1
  logic [CW-1:0]    cnt;    // steps still to do

  logic [WIDTH:0]   acc_next;

  always_comb begin
    unique case ({q[0], q_m1})
      2'b01:   acc_next = acc + mcand;
      2'b10:   acc_next = acc - mcand;
      default: acc_next = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEQ_IDLE;
      acc   <= '0;
      mcand <= '0;
      q     <= '0;
      q_m1  <= 1'b0;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SEQ_IDLE, SEQ_DONE: begin
          if (start) begin
            acc   <= '0;
            mcand <= {a[WIDTH-1], a};
            q     <= b;
            q_m1  <= 1'b0;
            cnt   <= CW'(WIDTH);
            state <= SEQ_RUN;
          end
        end
        SEQ_RUN: begin
          // add or subtract, then arithmetic shift of {A, Q, Q-1}
          acc  <= {acc_next[WIDTH], acc_next[WIDTH:1]};
          q    <= {acc_next[0], q[WIDTH-1:1]};
          q_m1 <= q[0];
          cnt  <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            state <= SEQ_DONE;
            done  <= 1'b1;
          end
        end
        default: state <= SEQ_IDLE;
      endcase
    end
  end

  assign busy    = (state == SEQ_RUN);
  assign product = {acc[WIDTH-1:0], q};

endmodule
