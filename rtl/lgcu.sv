// lgcu: loss gradient computation unit. NSLOT independent slots, one per
// training engine, each with its own LPE.
//
// A slot started for an agent with nsteps recorded steps works backwards
// through the agent's rollout. It first reads the value v of the extra
// bootstrap inference at step nsteps (R = 0 instead when the episode ended,
// 'terminal'), then for t = nsteps-1 down to 0 reads pi_t, v_t and r_t,
// forms the discounted return R = r_t + GAMMA*R and the advantage
// delta = R - v_t, passes z = pi_t and delta to its LPE and writes the five
// output-layer gradients of step t to the back-propagation buffer.
// Memory reads (o_*) are combinational; the write (g_we) is one word group.
// Timing: done pulses 2*nsteps + 1 cycles after the start cycle (2*nsteps
// for a terminal episode, which needs no bootstrap read).
// Computing R and delta inside the unit is this design's choice.
module lgcu
  import a3c_pkg::*;
#(
  parameter int    NSLOT = 6,
  parameter int    AGW   = 3,
  parameter fp32_t GAMMA = 32'h3F7D_70A4,   // 0.99
  parameter fp32_t ENT_C = 32'h3C23_D70A    // 0.01
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start    [NSLOT],
  input  logic [AGW-1:0]  agent_in [NSLOT],
  input  logic [2:0]      nsteps   [NSLOT],
  input  logic            terminal [NSLOT],
  output logic            done     [NSLOT],
  // read of the agent buffer: outputs and reward of step o_step
  output logic [AGW-1:0]  o_agent  [NSLOT],
  output logic [2:0]      o_step   [NSLOT],
  input  fp32_t           o_pi     [NSLOT][NUM_ACT],
  input  fp32_t           o_v      [NSLOT],
  input  fp32_t           o_r      [NSLOT],
  // write of the back-propagation buffer
  output logic            g_we     [NSLOT],
  output logic [2:0]      g_step   [NSLOT],
  output fp32_t           g_data   [NSLOT][OUT_ROWS]
);
  typedef enum logic [2:0] {L_IDLE, L_BOOT, L_STEP, L_WR, L_DONE} lstate_t;

  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    lstate_t    st;
    logic [2:0] t;
    fp32_t      ret, ret_n, delta;
    logic       lv;

    always_comb begin
      ret_n = fp_add(o_r[s], fp_mul(GAMMA, ret));
      delta = fp_sub(ret_n, o_v[s]);
    end

    lpe #(.ENT_C(ENT_C)) u_lpe (
      .clk, .rst_n, .valid(st == L_STEP), .z(o_pi[s]), .delta,
      .g(g_data[s]), .g_valid(lv)
    );

    assign o_step[s] = t;
    assign g_we[s]   = lv;
    assign g_step[s] = t;
    assign done[s]   = (st == L_DONE);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st         <= L_IDLE;
        t          <= '0;
        ret        <= FP_ZERO;
        o_agent[s] <= '0;
      end else begin
        case (st)
          L_IDLE: if (start[s]) begin
            o_agent[s] <= agent_in[s];
            t          <= nsteps[s];
            st         <= terminal[s] ? L_STEP : L_BOOT;
            ret        <= FP_ZERO;
            if (terminal[s]) t <= nsteps[s] - 3'd1;
          end
          L_BOOT: begin
            ret <= o_v[s];
            t   <= t - 3'd1;
            st  <= L_STEP;
          end
          L_STEP: begin
            ret <= ret_n;
            st  <= L_WR;
          end
          L_WR: begin
            if (t == 3'd0) st <= L_DONE;
            else begin
              t  <= t - 3'd1;
              st <= L_STEP;
            end
          end
          default: st <= L_IDLE;
        endcase
      end
    end
  end
endmodule
