// pi_compensator: the voltage and current PI compensators, sharing one
// multiplier.
//
// Each loop computes u[n] = u[n-1] + a*e[n] - b*e[n-1] (difference equation
// (1) of the discrete PI with a = k_p, b = k_p(1 - T_s/T_i)). The error e is
// "reference minus measurement"; the ADC side of the controller delivers
// "measurement minus reference" (x = sample - reference, as the window ADC and
// the current-error subtraction produce it), so e = -x here. The two loops keep
// their own state (u, previous error) and coefficients but run on one
// multiply-accumulate datapath: a start strobe with loop = LOOP_V or LOOP_I runs
// three clocks: a*e[n] is added, b*e[n-1] is subtracted, the sum is clamped to
// [0, 4096) and written back. The loops run at different times in the switching
// cycle, so they never contend. Number formats (this design's): coefficients
// unsigned Q6.10 (the defaults of eq. (9) are 40212, 35164, 246 and 212), state
// Q12.10 so the 12-bit outputs keep their fractional bits between cycles.
// Outputs: vc = integer part of the voltage loop state (12 bits); d = integer
// part of the current loop state; d_x = next fractional bit (13th duty bit used
// at 620 kHz). done pulses for one clock when the write-back has happened;
// latency 3 clocks = 0.6 ns, far inside the 40 ns budget.
`timescale 1ns/1ps
module pi_compensator
  import acm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  loop_e             loop,
  input  err_t              x,       // measurement minus reference
  input  coef_t             a_v,
  input  coef_t             b_v,
  input  coef_t             a_i,
  input  coef_t             b_i,
  output logic [VC_W-1:0]   vc,
  output logic [DUTY_W-1:0] d,
  output logic              d_x,
  output logic              busy,
  output logic              done
);
  localparam int unsigned U_W   = VC_W + COEF_FRAC;           // unsigned state
  localparam int unsigned E_W   = ERR_W + 1;                  // negated error
  localparam int unsigned P_W   = COEF_W + 1 + E_W;           // product
  localparam int unsigned ACC_W = P_W + 2;
  localparam logic [U_W-1:0] U_MAX = '1;

  typedef enum logic [1:0] { S_IDLE, S_MUL_A, S_MUL_B, S_WRITE } state_e;
  state_e state;

  logic [U_W-1:0]           u_v, u_i;
  logic signed [E_W-1:0]    ep_v, ep_i;     // e[n-1] per loop
  logic signed [E_W-1:0]    e_now;
  loop_e                    loop_q;
  logic signed [ACC_W-1:0]  acc;

  // Shared multiplier: one coefficient times one error per clock.
  coef_t                 m_coef;
  logic signed [E_W-1:0] m_err;
  logic signed [P_W-1:0] m_prod;
  logic signed [COEF_W:0] m_coef_s;   // coefficient, zero-extended to signed
  always_comb begin
    m_coef = '0;
    m_err  = '0;
    case (state)
      S_MUL_A: begin
        m_coef = (loop_q == LOOP_V) ? a_v : a_i;
        m_err  = e_now;
      end
      S_MUL_B: begin
        m_coef = (loop_q == LOOP_V) ? b_v : b_i;
        m_err  = (loop_q == LOOP_V) ? ep_v : ep_i;
      end
      default: ;
    endcase
    m_coef_s = {1'b0, m_coef};
    m_prod   = P_W'(m_coef_s) * P_W'(m_err);
  end

  // Clamp of the new state to [0, 4096).
  logic [U_W-1:0] u_new;
  always_comb begin
    if (acc < 0)                            u_new = '0;
    else if (acc > $signed(ACC_W'(U_MAX)))  u_new = U_MAX;
    else                                    u_new = acc[U_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      u_v    <= '0;
      u_i    <= '0;
      ep_v   <= '0;
      ep_i   <= '0;
      e_now  <= '0;
      loop_q <= LOOP_V;
      acc    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          loop_q <= loop;
          e_now  <= -E_W'(x);
          acc    <= ACC_W'({1'b0, (loop == LOOP_V) ? u_v : u_i});
          state  <= S_MUL_A;
        end
        S_MUL_A: begin
          acc   <= acc + ACC_W'(m_prod);
          state <= S_MUL_B;
        end
        S_MUL_B: begin
          acc   <= acc - ACC_W'(m_prod);
          state <= S_WRITE;
        end
        S_WRITE: begin
          if (loop_q == LOOP_V) begin u_v <= u_new; ep_v <= e_now; end
          else                  begin u_i <= u_new; ep_i <= e_now; end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign vc   = u_v[U_W-1 -: VC_W];
  assign d    = u_i[U_W-1 -: DUTY_W];
  assign d_x  = u_i[COEF_FRAC-1];

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start);
endmodule
