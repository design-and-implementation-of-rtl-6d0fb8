// booth_seq_mult: iterative radix-4 (modified) Booth multiplier, signed or unsigned operands.
//
// The datapath is a partial-product register A, the multiplier register Q with one extra bit
// Q(-1) below it, the multiplicand register B with its 2's complement, one carry look-ahead
// adder and an arithmetic right shift, sequenced by a control counter. Each step reads the
// three bits {Q1, Q0, Q(-1)}, adds 0, +-B or +-2B to A, and shifts {A, Q, Q(-1)} right
// arithmetically by two places: two multiplier bits are retired per step, so half as many
// additions are needed as with the bit-at-a-time Booth algorithm.
//
// Signed and unsigned operands, in any combination, are handled by extending both operands
// by two bits (sign or zero bit, per the a_signed / b_signed inputs) to M = N + 2 bits, which
// is then an exact signed multiplication; it takes M/2 = N/2 + 1 steps.
//
// Interface and timing: with busy low, a start pulse loads the operands on the rising clock
// edge. busy is high for the next M/2 cycles, one per step; on the edge that completes the last
// step, product is loaded and done pulses high for one cycle. product holds its value until the
// next multiplication ends. start while busy is ignored. rst is synchronous, active high.
//
// The datapath blocks (control counter, 2's complement, partial product register, adder,
// arithmetic right shift, output select) follow the reference architecture. The two-bit operand
// extension for signed/unsigned operation, the handshake and the reset are choices made here.
module booth_seq_mult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  input  logic           a_signed,   // 1: a is two's complement, 0: unsigned
  input  logic           b_signed,   // 1: b is two's complement, 0: unsigned
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);

  localparam int unsigned M     = N + 2;                    // extended operand width
  localparam int unsigned STEPS = M / 2;
  localparam int unsigned AW    = ((M + 2 + 3) / 4) * 4;    // A register, holds +-2B, CLA-sized
  localparam int unsigned CW    = $clog2(STEPS + 1);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;

  state_t         state;
  logic [CW-1:0]  count;
  logic [AW-1:0]  acc;                 // A
  logic [M-1:0]   q;                   // Q
  logic           q_m1;                // Q(-1)
  logic [AW-1:0]  bpos, bneg;          // +B and -B, sign-extended to AW bits

  logic [AW-1:0]  addend;
  logic [AW:0]    sum_full;
  logic [AW-1:0]  sum;
  logic [AW-1:0]  acc_next;
  logic [M-1:0]   q_next;

  // 2's complement of the multiplicand, formed once per multiplication.
  logic [AW-1:0]  a_ext;
  assign a_ext = AW'($signed({a_signed & a[N-1], a}));
  twos_complement #(.W(AW)) u_neg (.x(bpos), .neg_x(bneg));

  // Digit select: 0, +-B, +-2B.
  always_comb begin
    unique case ({q[1:0], q_m1})
      3'b001, 3'b010: addend = bpos;
      3'b011:         addend = bpos << 1;
      3'b100:         addend = bneg << 1;
      3'b101, 3'b110: addend = bneg;
      default:        addend = '0;
    endcase
  end

  cla_adder #(.WIDTH(AW)) u_add (.i_add1(acc), .i_add2(addend), .o_result(sum_full));
  assign sum = sum_full[AW-1:0];

  // Arithmetic right shift of {A, Q, Q(-1)} by two places.
  assign acc_next = AW'($signed(sum) >>> 2);
  assign q_next   = {sum[1:0], q[M-1:2]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      count   <= '0;
      acc     <= '0;
      q       <= '0;
      q_m1    <= 1'b0;
      bpos    <= '0;
      done    <= 1'b0;
      product <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            acc   <= '0;
            q     <= M'($signed({b_signed & b[N-1], b}));
            q_m1  <= 1'b0;
            bpos  <= a_ext;
            count <= CW'(STEPS);
            state <= S_RUN;
          end
        end
        S_RUN: begin
          acc   <= acc_next;
          q     <= q_next;
          q_m1  <= q[1];
          count <= count - 1'b1;
          if (count == CW'(1)) begin
            product <= {acc_next[2*N-M-1:0], q_next};
            done    <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);

endmodule
