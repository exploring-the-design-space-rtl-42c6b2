// fp_engine: word-serial prime-field unit for NIST P-192 (p = 2^192 - 2^64 - 1) working on
// 12-word operands in a single-port 16-bit data memory. It performs, on a start pulse, the
// operation op on the operands at a_base and b_base and writes the reduced result to
// c_base:
//   FOP_ADD  c = a + b mod p : word-serial add with carry, then, when the carry is set or
//            c >= p (compared most significant word first), p is subtracted in place.
//   FOP_SUB  c = a - b mod p : word-serial subtract with borrow, p added back on a borrow.
//   FOP_MUL  c = a * b mod p : product scanning on the integer MAC writes the 24-word
//            product to t_base; the fast reduction then sums, column by column,
//            D2D1D0 + D5D4D3 + D4D3*2^64 + D5*2^64 + D5 (Di = 64-bit chunks of the product),
//            folds the carry above 2^192 back in as carry*(2^64 + 1), and ends with the
//            same compare and conditional subtraction as the addition.
//   FOP_SQR  c = a * a mod p : as FOP_MUL but each off-diagonal product A[i]*A[j] (i < j)
//            is computed once and accumulated twice.
// Inputs must be reduced (< p). c may equal a or b; the 24-word area at t_base must
// overlap none of them. One memory access per cycle; read data arrive one cycle after the
// read. busy is high from the cycle after start until done, a one-cycle pulse; start is
// taken only while busy is low, so a new operation can start the cycle after done.
// The algorithms, the word size and the reduction pattern follow the source design, where
// they run as unrolled programs on a 16-bit CPU; this hardware sequencer in place of that
// program, its state order and its interface are this implementation's own, so its cycle
// counts differ from the program's.
module fp_engine
  import ecc_pkg::*;
#(
  parameter int unsigned AW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fop_e          op,
  input  logic [AW-1:0] a_base,
  input  logic [AW-1:0] b_base,
  input  logic [AW-1:0] c_base,
  input  logic [AW-1:0] t_base,
  output logic          busy,
  output logic          done,
  // data memory port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [W-1:0]  mem_wdata,
  input  logic [W-1:0]  mem_rdata
);

  typedef enum logic [4:0] {
    S_IDLE, S_AS_RA, S_AS_RB, S_AS_W, S_CMP_R, S_CMP_C, S_FIX_R, S_FIX_W,
    S_MUL_RA, S_MUL_RB, S_MUL_MAC, S_MUL_WR, S_MUL_WL,
    S_RED_R, S_RED_ACC, S_RED_W, S_RED_OVF, S_FOLD_R, S_FOLD_W, S_DONE
  } state_e;

  state_e        state;
  fop_e          op_q;
  logic [AW-1:0] a_q, b_q, c_q, t_q;
  logic [5:0]    idx;     // word index i (or j during the reduction)
  logic [5:0]    k;       // product column
  logic [2:0]    tsel;    // reduction term
  logic [W-1:0]  opa;     // first operand word
  logic          carry;   // carry / borrow between words
  logic [W-1:0]  ovf;     // carry above 2^192 after the reduction sum
  logic          fix_sub; // 1: subtract p, 0: add p

  // MAC and ALU
  mac_op_e       mac_op;
  logic [W-1:0]  mac_a, mac_b, mac_lo;
  alu_op_e       alu_op;
  logic [W-1:0]  alu_a, alu_b, alu_y;
  logic          alu_cin, alu_cout;

  mac_int #(.DW(W)) u_mac (
    .clk, .rst_n, .op(mac_op), .a(mac_a), .b(mac_b), .acc_lo(mac_lo), .acc()
  );

  neptun_alu #(.DW(W)) u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .cin(alu_cin), .y(alu_y), .cout(alu_cout),
    .zero()
  );

  localparam logic [5:0] NW1 = 6'(N - 1);

  // Last i of product column k: min(k, N-1) for a multiplication, k/2 for a squaring.
  function automatic logic [5:0] col_imax(input logic [5:0] kk, input logic sqr);
    if (sqr) return kk >> 1;
    return (kk > NW1) ? NW1 : kk;
  endfunction

  // First i of product column k: max(0, k-N+1).
  function automatic logic [5:0] col_imin(input logic [5:0] kk);
    return (kk > NW1) ? kk - NW1 : 6'd0;
  endfunction

  // Fast-reduction terms of result word j (16-bit word indices into the product):
  // T[j], T[12+j], T[8+j] for j >= 4, T[20+j] for j < 4, T[16+j] for 4 <= j < 8.
  function automatic logic term_ok(input logic [5:0] j, input logic [2:0] t);
    unique case (t)
      3'd0, 3'd1: return 1'b1;
      3'd2:       return j >= 6'd4;
      3'd3:       return j < 6'd4;
      3'd4:       return (j >= 6'd4) && (j < 6'd8);
      default:    return 1'b0;
    endcase
  endfunction

  function automatic logic [5:0] term_off(input logic [5:0] j, input logic [2:0] t);
    unique case (t)
      3'd0:    return j;
      3'd1:    return j + 6'd12;
      3'd2:    return j + 6'd8;
      3'd3:    return j + 6'd20;
      default: return j + 6'd16;
    endcase
  endfunction

  logic sqr;
  logic [5:0] jdx;
  assign sqr = (op_q == FOP_SQR);
  assign jdx = k - idx;

  // datapath control
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    mac_op    = MAC_NOP;
    mac_a     = '0;
    mac_b     = '0;
    alu_op    = ALU_ADD;
    alu_a     = '0;
    alu_b     = '0;
    alu_cin   = carry;
    unique case (state)
      S_IDLE: mac_op = MAC_CLR;
      S_AS_RA, S_MUL_RA: begin
        mem_en   = 1'b1;
        mem_addr = a_q + AW'(idx);
      end
      S_AS_RB: begin
        mem_en   = 1'b1;
        mem_addr = b_q + AW'(idx);
      end
      S_AS_W: begin
        alu_op    = (op_q == FOP_SUB) ? ALU_SUB : ALU_ADD;
        alu_a     = opa;
        alu_b     = mem_rdata;
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = alu_y;
      end
      S_CMP_R, S_FIX_R, S_FOLD_R: begin
        mem_en   = 1'b1;
        mem_addr = c_q + AW'(idx);
      end
      S_FIX_W: begin
        alu_op    = fix_sub ? ALU_SUB : ALU_ADD;
        alu_a     = mem_rdata;
        alu_b     = p192_word(idx);
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = alu_y;
      end
      S_MUL_RB: begin
        mem_en   = 1'b1;
        mem_addr = (sqr ? a_q : b_q) + AW'(jdx);
      end
      S_MUL_MAC: begin
        mac_op = (sqr && (idx != jdx)) ? MAC_MUL2 : MAC_MUL;
        mac_a  = opa;
        mac_b  = mem_rdata;
      end
      S_MUL_WR: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = t_q + AW'(k);
        mem_wdata = mac_lo;
        mac_op    = MAC_SHR;
      end
      S_MUL_WL: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = t_q + AW'(2 * N - 1);
        mem_wdata = mac_lo;
        mac_op    = MAC_CLR;
      end
      S_RED_R: begin
        mem_en   = term_ok(idx, tsel);
        mem_addr = t_q + AW'(term_off(idx, tsel));
      end
      S_RED_ACC: begin
        mac_op = MAC_ADD;
        mac_a  = mem_rdata;
      end
      S_RED_W: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = mac_lo;
        mac_op    = MAC_SHR;
      end
      S_FOLD_W: begin
        alu_op    = ALU_ADD;
        alu_a     = mem_rdata;
        alu_b     = ((idx == 6'd0) || (idx == 6'd4)) ? ovf : '0;
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = alu_y;
      end
      default: ;
    endcase
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      op_q    <= FOP_ADD;
      a_q     <= '0;
      b_q     <= '0;
      c_q     <= '0;
      t_q     <= '0;
      idx     <= '0;
      k       <= '0;
      tsel    <= '0;
      opa     <= '0;
      carry   <= 1'b0;
      ovf     <= '0;
      fix_sub <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          a_q   <= a_base;
          b_q   <= b_base;
          c_q   <= c_base;
          t_q   <= t_base;
          idx   <= '0;
          k     <= '0;
          carry <= 1'b0;
          state <= (op == FOP_ADD || op == FOP_SUB) ? S_AS_RA : S_MUL_RA;
        end
        // ---- addition / subtraction (Algorithm 1 structure)
        S_AS_RA: state <= S_AS_RB;
        S_AS_RB: begin
          opa   <= mem_rdata;
          state <= S_AS_W;
        end
        S_AS_W: begin
          carry <= alu_cout;
          if (idx == NW1) begin
            idx <= '0;
            if (op_q == FOP_SUB) begin
              carry   <= 1'b0;
              fix_sub <= 1'b0;
              state   <= alu_cout ? S_FIX_R : S_DONE;
            end else if (alu_cout) begin
              carry   <= 1'b0;
              fix_sub <= 1'b1;
              state   <= S_FIX_R;
            end else begin
              idx   <= NW1;
              state <= S_CMP_R;
            end
          end else begin
            idx   <= idx + 6'd1;
            state <= S_AS_RA;
          end
        end
        // ---- c >= p ? scanned from the most significant word
        S_CMP_R: state <= S_CMP_C;
        S_CMP_C: begin
          if (mem_rdata < p192_word(idx)) begin
            state <= S_DONE;
          end else if (mem_rdata > p192_word(idx) || idx == 6'd0) begin
            idx     <= '0;
            carry   <= 1'b0;
            fix_sub <= 1'b1;
            state   <= S_FIX_R;
          end else begin
            idx   <= idx - 6'd1;
            state <= S_CMP_R;
          end
        end
        // ---- c = c -/+ p in place
        S_FIX_R: state <= S_FIX_W;
        S_FIX_W: begin
          carry <= alu_cout;
          if (idx == NW1) state <= S_DONE;
          else begin
            idx   <= idx + 6'd1;
            state <= S_FIX_R;
          end
        end
        // ---- product scanning
        S_MUL_RA: state <= S_MUL_RB;
        S_MUL_RB: begin
          opa   <= mem_rdata;
          state <= S_MUL_MAC;
        end
        S_MUL_MAC: begin
          if (idx == col_imax(k, sqr)) state <= S_MUL_WR;
          else begin
            idx   <= idx + 6'd1;
            state <= S_MUL_RA;
          end
        end
        S_MUL_WR: begin
          if (k == 6'(2 * N - 2)) state <= S_MUL_WL;
          else begin
            k     <= k + 6'd1;
            idx   <= col_imin(k + 6'd1);
            state <= S_MUL_RA;
          end
        end
        S_MUL_WL: begin
          idx   <= '0;
          tsel  <= '0;
          state <= S_RED_R;
        end
        // ---- P-192 fast reduction, one result word per pass
        S_RED_R: begin
          if (term_ok(idx, tsel)) state <= S_RED_ACC;
          else if (tsel == 3'd4) state <= S_RED_W;
          else tsel <= tsel + 3'd1;
        end
        S_RED_ACC: begin
          if (tsel == 3'd4) state <= S_RED_W;
          else begin
            tsel  <= tsel + 3'd1;
            state <= S_RED_R;
          end
        end
        S_RED_W: begin
          tsel <= '0;
          if (idx == NW1) state <= S_RED_OVF;
          else begin
            idx   <= idx + 6'd1;
            state <= S_RED_R;
          end
        end
        S_RED_OVF: begin
          ovf   <= mac_lo;
          carry <= 1'b0;
          if (mac_lo != '0) begin
            idx   <= '0;
            state <= S_FOLD_R;
          end else begin
            idx   <= NW1;
            state <= S_CMP_R;
          end
        end
        // ---- fold the carry above 2^192 back in: 2^192 = 2^64 + 1 (mod p)
        S_FOLD_R: state <= S_FOLD_W;
        S_FOLD_W: begin
          carry <= alu_cout;
          if (idx == NW1) begin
            carry <= 1'b0;
            if (alu_cout) begin
              ovf   <= W'(1);
              idx   <= '0;
              state <= S_FOLD_R;
            end else begin
              idx   <= NW1;
              state <= S_CMP_R;
            end
          end else begin
            idx   <= idx + 6'd1;
            state <= S_FOLD_R;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

endmodule
