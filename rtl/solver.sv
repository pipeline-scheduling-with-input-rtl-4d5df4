// One ODE Solver of the biochemical simulator: an Integrator with its
// [X], k and d[X] memories around a Solver Core for the rate law of
// v = (Ka*Xa/(Xa/Kb)) / (1 + Xa/Kb + Kc/Xb).
//
// [X] RAM drives the core's X port, k RAM drives its k1 and k2 ports and the
// returned reaction rate v is stored in d[X] RAM, as in the Solver structure
// of the document. The Integrator streams all reactions through the core at
// its pitch of two cycles, then integrates the concentrations with explicit
// Euler steps (this design's choice of method), for n_steps time steps.
//
// The memories are loaded and read back through the host ports while busy is
// low; they stand in for the board's host interface, which is not part of
// this RTL. Pulse start to run; done rises when the last step is finished.
module solver
  import recsip_pkg::*;
#(
  parameter int unsigned N_X = 64,
  parameter int unsigned N_R = 32,
  parameter int unsigned N_U = 64,
  localparam int unsigned XW = $clog2(N_X),
  localparam int unsigned RW = $clog2(N_R),
  localparam int unsigned KW = $clog2(N_R * PITCH),
  localparam int unsigned UW = $clog2(N_U)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_x_we,
  input  logic [XW-1:0] host_x_addr,
  input  fp32_t         host_x_wdata,
  output fp32_t         host_x_rdata,
  input  logic          host_k_we,
  input  logic [KW-1:0] host_k_addr,
  input  fp32_t         host_k1_wdata,
  input  fp32_t         host_k2_wdata,
  input  logic          host_rt_we,
  input  logic [KW-1:0] host_rt_addr,
  input  logic [XW-1:0] host_rt_wdata,
  input  logic          host_u_we,
  input  logic [UW-1:0] host_u_addr,
  input  logic          host_u_neg,
  input  logic [RW-1:0] host_u_r,
  input  logic [XW-1:0] host_u_i,
  input  logic          start,
  input  logic [RW:0]   n_react,
  input  logic [UW:0]   n_upd,
  input  logic [15:0]   n_steps,
  input  fp32_t         dt,
  output logic          busy,
  output logic          done,
  output logic [15:0]   step_cnt
);

  logic  core_in_valid, core_state, core_v_valid;
  fp32_t core_x, core_k1, core_k2, core_v;

  integrator #(.N_X(N_X), .N_R(N_R), .N_U(N_U), .P(PITCH)) u_integrator (
    .clk, .rst_n,
    .host_x_we, .host_x_addr, .host_x_wdata, .host_x_rdata,
    .host_k_we, .host_k_addr, .host_k1_wdata, .host_k2_wdata,
    .host_rt_we, .host_rt_addr, .host_rt_wdata,
    .host_u_we, .host_u_addr, .host_u_neg, .host_u_r, .host_u_i,
    .start, .n_react, .n_upd, .n_steps, .dt, .busy, .done, .step_cnt,
    .core_in_valid, .core_x, .core_k1, .core_k2,
    .core_state, .core_v_valid, .core_v
  );

  solver_core u_core (
    .clk, .rst_n,
    .in_valid (core_in_valid),
    .x        (core_x),
    .k1       (core_k1),
    .k2       (core_k2),
    .state    (core_state),
    .v_valid  (core_v_valid),
    .v        (core_v)
  );

endmodule
