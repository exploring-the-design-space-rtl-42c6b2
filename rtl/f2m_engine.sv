// f2m_engine: word-serial binary-field unit for F_2^191 with f(z) = z^191 + z^9 + 1
// (ANSI X9.62 c2tnb191v1) working on 12-word polynomials in a single-port 16-bit data
// memory. On a start pulse it performs op on the operands at a_base and b_base and writes
// the reduced result to c_base:
//   FOP_ADD, FOP_SUB  c = a + b : word-wise XOR, no carries and no reduction.
//   FOP_MUL  c = a * b mod f : product scanning on the carry-less MAC writes the 24-word
//            product to t_base, then the hardcoded reduction logic produces the 12 result
//            words from the most significant end down (three product words per result word
//            are held in registers, so each word costs one product read, one read of the low
//            half and one write).
//   FOP_SQR  c = a^2 mod f : only the M diagonal products A[i]*A[i] are formed (two
//            product words each), then the same reduction.
// Inputs must be reduced (degree < 191). c may equal a or b; the 24-word area at t_base must
// overlap none of them. One memory access per cycle; read data arrive one cycle after the
// read. busy is high from the cycle after start until done, a one-cycle pulse; start is
// taken only while busy is low, so a new operation can start the cycle after done.
// The algorithms and the word size follow the source design, where they run as unrolled
// programs on a 16-bit CPU with carry-less MAC and reduction helper; this hardware sequencer
// in place of that program, its state order and its interface are this implementation's
// own, so its cycle counts differ from the program's.
module f2m_engine
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
    S_IDLE, S_AS_RA, S_AS_RB, S_AS_W,
    S_MUL_RA, S_MUL_RB, S_MUL_MAC, S_MUL_WR, S_MUL_WL,
    S_SQ_R, S_SQ_MAC, S_SQ_W0, S_SQ_W1,
    S_RG_R1, S_RG_R2, S_RG_G, S_RB_RLO, S_RB_RL, S_RB_W, S_DONE
  } state_e;

  localparam logic [5:0] MW1 = 6'(M - 1);

  state_e        state;
  logic [AW-1:0] a_q, b_q, c_q, t_q;
  logic [5:0]    idx;   // word index i, or result word j during the reduction
  logic [5:0]    k;     // product column
  logic [W-1:0]  opa;
  logic [W-1:0]  t_hi, t_mid, t_lo;  // T[12+j], T[11+j], T[10+j]
  logic [7:0]    g;                  // product bits 373..380

  mac_op_e       mac_op;
  logic [W-1:0]  mac_a, mac_b, mac_lo;
  alu_op_e       alu_op;
  logic [W-1:0]  alu_a, alu_b, alu_y;
  logic [W-1:0]  red_r;
  logic [7:0]    red_g;

  mac_bin #(.DW(W)) u_mac (
    .clk, .rst_n, .op(mac_op), .a(mac_a), .b(mac_b), .acc_lo(mac_lo), .acc()
  );

  neptun_alu #(.DW(W)) u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .cin(1'b0), .y(alu_y), .cout(),
    .zero()
  );

  f2m_red_logic u_red (
    .t_hi     (t_hi),
    .t_mid    (state == S_RG_G ? mem_rdata : t_mid),
    .t_lo     (t_lo),
    .t_low    (mem_rdata),
    .g        (g),
    .is_first (idx == 6'd0),
    .is_second(idx == 6'd1),
    .is_top   (idx == MW1),
    .r        (red_r),
    .g_out    (red_g)
  );

  logic [5:0] jdx;
  assign jdx = k - idx;

  function automatic logic [5:0] col_imax(input logic [5:0] kk);
    return (kk > MW1) ? MW1 : kk;
  endfunction

  function automatic logic [5:0] col_imin(input logic [5:0] kk);
    return (kk > MW1) ? kk - MW1 : 6'd0;
  endfunction

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    mac_op    = MAC_NOP;
    mac_a     = '0;
    mac_b     = '0;
    alu_op    = ALU_XOR;
    alu_a     = '0;
    alu_b     = '0;
    unique case (state)
      S_IDLE: mac_op = MAC_CLR;
      S_AS_RA, S_MUL_RA, S_SQ_R: begin
        mem_en   = 1'b1;
        mem_addr = a_q + AW'(idx);
      end
      S_AS_RB: begin
        mem_en   = 1'b1;
        mem_addr = b_q + AW'(idx);
      end
      S_AS_W: begin
        alu_a     = opa;
        alu_b     = mem_rdata;
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = alu_y;
      end
      S_MUL_RB: begin
        mem_en   = 1'b1;
        mem_addr = b_q + AW'(jdx);
      end
      S_MUL_MAC: begin
        mac_op = MAC_MUL;
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
        mem_addr  = t_q + AW'(2 * M - 1);
        mem_wdata = mac_lo;
        mac_op    = MAC_CLR;
      end
      S_SQ_MAC: begin
        mac_op = MAC_MUL;
        mac_a  = mem_rdata;
        mac_b  = mem_rdata;
      end
      S_SQ_W0, S_SQ_W1: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = t_q + AW'({idx[4:0], state == S_SQ_W1});
        mem_wdata = mac_lo;
        mac_op    = MAC_SHR;
      end
      S_RG_R1: begin
        mem_en   = 1'b1;
        mem_addr = t_q + AW'(2 * M - 1);
      end
      S_RG_R2: begin
        mem_en   = 1'b1;
        mem_addr = t_q + AW'(2 * M - 2);
      end
      S_RB_RLO: begin
        mem_en   = (idx != 6'd0);
        mem_addr = t_q + AW'(idx + 6'd10);
      end
      S_RB_RL: begin
        mem_en   = 1'b1;
        mem_addr = t_q + AW'(idx);
      end
      S_RB_W: begin
        mem_en    = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = c_q + AW'(idx);
        mem_wdata = red_r;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      t_q   <= '0;
      idx   <= '0;
      k     <= '0;
      opa   <= '0;
      t_hi  <= '0;
      t_mid <= '0;
      t_lo  <= '0;
      g     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= a_base;
          b_q   <= b_base;
          c_q   <= c_base;
          t_q   <= t_base;
          idx   <= '0;
          k     <= '0;
          unique case (op)
            FOP_MUL: state <= S_MUL_RA;
            FOP_SQR: state <= S_SQ_R;
            default: state <= S_AS_RA;
          endcase
        end
        // ---- addition (Algorithm 2)
        S_AS_RA: state <= S_AS_RB;
        S_AS_RB: begin
          opa   <= mem_rdata;
          state <= S_AS_W;
        end
        S_AS_W: begin
          if (idx == MW1) state <= S_DONE;
          else begin
            idx   <= idx + 6'd1;
            state <= S_AS_RA;
          end
        end
        // ---- product scanning
        S_MUL_RA: state <= S_MUL_RB;
        S_MUL_RB: begin
          opa   <= mem_rdata;
          state <= S_MUL_MAC;
        end
        S_MUL_MAC: begin
          if (idx == col_imax(k)) state <= S_MUL_WR;
          else begin
            idx   <= idx + 6'd1;
            state <= S_MUL_RA;
          end
        end
        S_MUL_WR: begin
          if (k == 6'(2 * M - 2)) state <= S_MUL_WL;
          else begin
            k     <= k + 6'd1;
            idx   <= col_imin(k + 6'd1);
            state <= S_MUL_RA;
          end
        end
        S_MUL_WL: state <= S_RG_R1;
        // ---- squaring: M diagonal products
        S_SQ_R:   state <= S_SQ_MAC;
        S_SQ_MAC: state <= S_SQ_W0;
        S_SQ_W0:  state <= S_SQ_W1;
        S_SQ_W1: begin
          if (idx == MW1) state <= S_RG_R1;
          else begin
            idx   <= idx + 6'd1;
            state <= S_SQ_R;
          end
        end
        // ---- reduction: fetch the two top product words, then word j = 11 .. 0
        S_RG_R1: state <= S_RG_R2;
        S_RG_R2: begin
          t_hi  <= mem_rdata;
          state <= S_RG_G;
        end
        S_RG_G: begin
          t_mid <= mem_rdata;
          g     <= red_g;
          idx   <= MW1;
          state <= S_RB_RLO;
        end
        S_RB_RLO: state <= S_RB_RL;
        S_RB_RL: begin
          t_lo  <= (idx != 6'd0) ? mem_rdata : '0;
          state <= S_RB_W;
        end
        S_RB_W: begin
          t_hi  <= t_mid;
          t_mid <= t_lo;
          if (idx == 6'd0) state <= S_DONE;
          else begin
            idx   <= idx - 6'd1;
            state <= S_RB_RLO;
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
