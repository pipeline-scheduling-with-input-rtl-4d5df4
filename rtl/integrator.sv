// Integrator of one Solver: memories, reaction sequencing and explicit-Euler
// integration around a Solver Core.
//
// The Integrator holds the three memories of a Solver: [X] RAM with the
// concentrations, k RAM with the rate coefficients of every reaction, and
// d[X] RAM with the reaction rates v returned by the Solver Core. One time
// step has two phases:
//
//  1. Evaluate. Every reaction r < n_react is streamed into the Solver Core
//     at its pitch (two cycles per reaction). For input state p the reaction
//     table gives the species whose concentration goes to the X port, and
//     k RAM word r*P+p gives the k1 and k2 port values. Rates come back in
//     order and are written to d[X] RAM word r.
//  2. Update. Each entry u < n_upd of the update table names a reaction r,
//     a species i and a sign, and applies X[i] += sign * dt * v[r]. Entries
//     are applied one at a time (read, multiply, add, write back), so an
//     entry always sees the result of the previous one.
//
// After n_steps steps the Integrator raises done and stays idle until the
// next start. The memories, the Solver Core's port assignment and the fact
// that the Integrator runs the time steps follow the document; the Euler
// method, the table formats, the update order and the host ports are this
// design's choices.
//
// Timing: memories have one-cycle synchronous reads. The reaction feed is
// two reads deep (reaction table/k RAM, then [X] RAM), so a reaction's first
// read is issued two cycles before the core is in state 0. A step takes
// about 2*n_react + 84 cycles for phase 1 and 14 cycles per update entry.
// Host writes and reads are accepted only while busy is low.
module integrator
  import recsip_pkg::*;
#(
  parameter int unsigned N_X = 64,            // [X] RAM words (species)
  parameter int unsigned N_R = 32,            // reactions (d[X] RAM words)
  parameter int unsigned N_U = 64,            // update-table entries
  parameter int unsigned P   = PITCH,         // pitch of the Solver Core
  localparam int unsigned XW = $clog2(N_X),
  localparam int unsigned RW = $clog2(N_R),
  localparam int unsigned KW = $clog2(N_R * P),
  localparam int unsigned UW = $clog2(N_U)
) (
  input  logic         clk,
  input  logic         rst_n,
  // host access to the memories (while idle)
  input  logic         host_x_we,
  input  logic [XW-1:0] host_x_addr,
  input  fp32_t        host_x_wdata,
  output fp32_t        host_x_rdata,       // [X] RAM at host_x_addr, one cycle later
  input  logic         host_k_we,
  input  logic [KW-1:0] host_k_addr,       // r*P + state
  input  fp32_t        host_k1_wdata,
  input  fp32_t        host_k2_wdata,
  input  logic         host_rt_we,
  input  logic [KW-1:0] host_rt_addr,      // r*P + state
  input  logic [XW-1:0] host_rt_wdata,     // species sent to the X port
  input  logic         host_u_we,
  input  logic [UW-1:0] host_u_addr,
  input  logic         host_u_neg,         // 1: X[i] -= dt*v[r]
  input  logic [RW-1:0] host_u_r,
  input  logic [XW-1:0] host_u_i,
  // run control
  input  logic         start,
  input  logic [RW:0]  n_react,            // 1 .. N_R
  input  logic [UW:0]  n_upd,              // 0 .. N_U
  input  logic [15:0]  n_steps,            // >= 1
  input  fp32_t        dt,
  output logic         busy,
  output logic         done,
  output logic [15:0]  step_cnt,
  // Solver Core
  output logic         core_in_valid,
  output fp32_t        core_x,
  output fp32_t        core_k1,
  output fp32_t        core_k2,
  input  logic         core_state,
  input  logic         core_v_valid,
  input  fp32_t        core_v
);

  typedef struct packed {
    logic          neg;
    logic [RW-1:0] r;
    logic [XW-1:0] i;
  } upd_t;

  typedef enum logic [2:0] {
    S_IDLE, S_EVAL, S_DRAIN, S_U_RD, S_U_OPND, S_U_MUL, S_U_ADD
  } st_t;

  localparam int unsigned LEAD = 2;   // read stages ahead of the core input

  // memories
  fp32_t          x_ram  [N_X];
  fp32_t          k1_ram [N_R*P];
  fp32_t          k2_ram [N_R*P];
  logic [XW-1:0]  rt_ram [N_R*P];
  fp32_t          dx_ram [N_R];
  upd_t           u_ram  [N_U];

  st_t            st;
  logic [RW:0]    iss_r, wr_r;
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;
  logic [PW-1:0]  iss_p;
  logic [UW:0]    u_idx;
  upd_t           u_cur;
  fp32_t          x_old;

  // ---------------------------------------------------------------- feed
  logic          iss;          // issue a read for (iss_r, iss_p)
  logic          ahead_zero;   // the core will be in state 0 LEAD cycles on
  logic [KW-1:0] iss_addr;
  assign ahead_zero = ((int'(core_state) + LEAD) % P) == 0;
  assign iss_addr   = KW'(iss_r * P + iss_p);
  assign iss        = (st == S_EVAL) && (iss_r < n_react) && ((iss_p != 0) || ahead_zero);

  logic          f1_v, f2_v;
  logic [XW-1:0] f1_xi;
  fp32_t         f1_k1, f1_k2, f2_k1, f2_k2, x_rd, dx_rd;
  always_ff @(posedge clk) begin
    f1_xi <= rt_ram[iss_addr];
    f1_k1 <= k1_ram[iss_addr];
    f1_k2 <= k2_ram[iss_addr];
    f2_k1 <= f1_k1;
    f2_k2 <= f1_k2;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1_v <= 1'b0;
      f2_v <= 1'b0;
    end else begin
      f1_v <= iss;
      f2_v <= f1_v;
    end
  end

  assign core_in_valid = f2_v;
  assign core_x        = x_rd;
  assign core_k1       = f2_k1;
  assign core_k2       = f2_k2;

  // ------------------------------------------------------ update datapath
  logic  mul_v, add_v;
  fp32_t mul_y, add_y;
  fp_mul u_mul (.clk, .rst_n, .in_valid(st == S_U_OPND), .a(dt), .b(dx_rd),
                .out_valid(mul_v), .y(mul_y));
  fp_add u_add (.clk, .rst_n, .in_valid(st == S_U_MUL && mul_v), .sub(u_cur.neg),
                .a(x_old), .b(mul_y), .out_valid(add_v), .y(add_y));

  // ------------------------------------------------------ [X] RAM port
  logic [XW-1:0] x_raddr, x_waddr;
  logic          x_we;
  fp32_t         x_wdata;
  always_comb begin
    if (st == S_EVAL || st == S_DRAIN) x_raddr = f1_xi;
    else if (st == S_U_RD)             x_raddr = u_cur.i;
    else                               x_raddr = host_x_addr;
    x_we    = 1'b0;
    x_waddr = host_x_addr;
    x_wdata = host_x_wdata;
    if (st == S_U_ADD && add_v) begin
      x_we    = 1'b1;
      x_waddr = u_cur.i;
      x_wdata = add_y;
    end else if (st == S_IDLE && host_x_we) begin
      x_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    x_rd  <= x_ram[x_raddr];
    dx_rd <= dx_ram[u_cur.r];
    if (x_we) x_ram[x_waddr] <= x_wdata;
    if (st == S_IDLE) begin
      if (host_k_we) begin
        k1_ram[host_k_addr] <= host_k1_wdata;
        k2_ram[host_k_addr] <= host_k2_wdata;
      end
      if (host_rt_we) rt_ram[host_rt_addr] <= host_rt_wdata;
      if (host_u_we)  u_ram[host_u_addr]   <= '{neg: host_u_neg, r: host_u_r, i: host_u_i};
    end
    if (core_v_valid) dx_ram[wr_r[RW-1:0]] <= core_v;
    if (st == S_U_OPND) x_old <= x_rd;
    if (st == S_DRAIN)               u_cur <= u_ram[0];
    else if (st == S_U_ADD && add_v) u_cur <= u_ram[u_idx[UW-1:0]];
  end

  assign host_x_rdata = x_rd;

  // ------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      iss_r    <= '0;
      iss_p    <= '0;
      wr_r     <= '0;
      u_idx    <= '0;
      step_cnt <= '0;
      done     <= 1'b0;
    end else begin
      if (iss) begin
        if (iss_p == PW'(P - 1)) begin
          iss_p <= '0;
          iss_r <= iss_r + 1'b1;
        end else begin
          iss_p <= iss_p + 1'b1;
        end
      end
      if (core_v_valid) wr_r <= wr_r + 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          st       <= S_EVAL;
          done     <= 1'b0;
          step_cnt <= '0;
          iss_r    <= '0;
          iss_p    <= '0;
          wr_r     <= '0;
        end
        S_EVAL: if (iss_r == n_react) st <= S_DRAIN;
        S_DRAIN: if (wr_r == n_react) begin
          u_idx <= '0;
          st    <= S_U_RD;
        end
        // u_cur has been loaded with entry u_idx
        S_U_RD: begin
          if (u_idx == n_upd) begin
            step_cnt <= step_cnt + 16'd1;
            iss_r    <= '0;
            iss_p    <= '0;
            wr_r     <= '0;
            if (step_cnt + 16'd1 >= n_steps) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              st <= S_EVAL;
            end
          end else begin
            st    <= S_U_OPND;
            u_idx <= u_idx + 1'b1;
          end
        end
        S_U_OPND: st <= S_U_MUL;                 // x_rd, dx_rd valid now
        S_U_MUL:  if (mul_v) st <= S_U_ADD;
        S_U_ADD:  if (add_v) st <= S_U_RD;       // u_cur reloaded with the next entry
        default:  st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  a_order : assert property (@(posedge clk) disable iff (!rst_n)
                             core_v_valid |-> (wr_r < n_react))
    else $error("integrator: more rates returned than reactions issued");

endmodule
