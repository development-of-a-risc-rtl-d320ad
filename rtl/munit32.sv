// munit32: multiply/divide unit of the M extension (Execute stage).
// A multi-cycle unit: the Execute stage holds `req` with the operation and
// operands; the unit computes and raises `ready` with the result, which it
// keeps until `ack` (the instruction leaves Execute) or `kill` (pipeline
// flush). Multiplication uses one registered signed product of the sign- or
// zero-extended operands, so the
// result is ready two cycles after req rises. Division is restoring radix-2,
// one quotient bit per cycle, ready 34 cycles after req. Division by zero
// and signed overflow give the results the ISA prescribes. That the unit is
// multi-cycle and stalls Execute follows the document; the latencies are this
// design's choice.
module munit32
  import rv32x_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  md_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        ack,
  input  logic        kill,
  output logic        ready,
  output logic [31:0] result
);
  typedef enum logic [1:0] { S_IDLE, S_MUL, S_DIV, S_DONE } st_e;
  st_e st;

  logic [65:0] prod;
  logic [31:0] dvd, dvs, quo, rem;
  logic [5:0]  cnt;
  logic        neg_q, neg_r;
  md_op_e      op_q;

  logic signed [65:0] ma, mb;
  always_comb begin
    ma = (op == MD_MULH || op == MD_MULHSU) ? {{34{a[31]}}, a} : {34'd0, a};
    mb = (op == MD_MULH)                    ? {{34{b[31]}}, b} : {34'd0, b};
  end

  logic is_signed_div;
  assign is_signed_div = (op == MD_DIV || op == MD_REM);

  logic [32:0] rem_shift;
  assign rem_shift = {rem, dvd[31]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; prod <= '0; dvd <= '0; dvs <= '0; quo <= '0; rem <= '0;
      cnt <= '0; neg_q <= 1'b0; neg_r <= 1'b0; op_q <= MD_MUL; result <= '0;
    end else if (kill) begin
      st <= S_IDLE;
    end else begin
      unique case (st)
        S_IDLE: if (req) begin
          op_q <= op;
          if (op inside {MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU}) begin
            prod <= ma * mb;
            st   <= S_MUL;
          end else begin
            dvd   <= (is_signed_div && a[31]) ? -a : a;
            dvs   <= (is_signed_div && b[31]) ? -b : b;
            neg_q <= is_signed_div && (a[31] ^ b[31]) && (b != 0);
            neg_r <= is_signed_div && a[31];
            quo   <= '0;
            rem   <= '0;
            cnt   <= 6'd32;
            st    <= S_DIV;
          end
        end
        S_MUL: begin
          result <= (op_q == MD_MUL) ? prod[31:0] : prod[63:32];
          st     <= S_DONE;
        end
        S_DIV: begin
          if (cnt != 0) begin
            if (rem_shift >= {1'b0, dvs}) begin
              rem <= 32'(rem_shift - {1'b0, dvs});
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= rem_shift[31:0];
              quo <= {quo[30:0], 1'b0};
            end
            dvd <= {dvd[30:0], 1'b0};
            cnt <= cnt - 6'd1;
          end else begin
            // divide by zero: quotient all ones, remainder = dividend,
            // which the restoring loop produces before sign fix-up
            if (op_q == MD_DIV || op_q == MD_DIVU) result <= neg_q ? -quo : quo;
            else                                   result <= neg_r ? -rem : rem;
            st <= S_DONE;
          end
        end
        S_DONE: if (ack) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assign ready = (st == S_DONE);
endmodule
