// bsp_vision_system: the three bit-serial array machines, side by side.
//
// Three SIMD machines built from the same bit-serial PE and differing only in
// how the PEs are linked: a four-nearest-neighbour mesh (nn_*), the CAAPP mesh
// of 4 x 4 submeshes (ca_*) and a pyramid of 8NN meshes (py_*). Each machine
// has its own microcoded array controller, fed by a host through a microcode
// load port and an instruction port, and its own array with edge switches,
// border register (image I/O) and SOME/NONE and responder-count outputs. The
// pyramid's root parent link is brought out (py_parent_i, py_root_o).
//
// The published system is sized for a 512 x 512 image (a 10-layer pyramid);
// here the defaults are ROWS = COLS = 64 (one 64-package board of the flat
// machines) and LEVELS = 7, because elaborating a full-size array takes more
// memory than the tools that compile it can have. All ports are synchronous to
// clk; rst is a synchronous reset of every machine. See array_controller for
// the instruction handshake and flat_array / pyramid_array for the arrays.
module bsp_vision_system
  import bsp_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned LEVELS   = 7,
  parameter int unsigned MEM_BITS = PE_MEM_BITS,
  parameter int unsigned UC_DEPTH = 64,
  parameter int unsigned MAX_P    = 64,
  localparam int unsigned UA_W    = $clog2(UC_DEPTH),
  localparam int unsigned P_W     = $clog2(MAX_P + 1),
  localparam int unsigned NN_NB   = COLS,
  localparam int unsigned CA_NB   = ROWS / 4,
  localparam int unsigned PY_NB   = 1 << (LEVELS - 1),
  localparam int unsigned NN_CW   = $clog2(ROWS*COLS + 1),
  localparam int unsigned CA_CW   = $clog2(ROWS*COLS + 1),
  localparam int unsigned PY_CW   = $clog2((((1 << (2*LEVELS)) - 1) / 3) + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  // ---- 4NN mesh machine ----
  input  logic                  nn_uc_we,
  input  logic [UA_W-1:0]       nn_uc_addr,
  input  uentry_t               nn_uc_wdata,
  input  logic                  nn_cmd_valid,
  output logic                  nn_cmd_ready,
  input  logic [UA_W-1:0]       nn_cmd_start,
  input  logic [UA_W-1:0]       nn_cmd_loop,
  input  logic [P_W-1:0]        nn_cmd_passes,
  input  logic [MAX_P-1:0]      nn_cmd_pattern,
  output logic                  nn_busy,
  input  edge_mode_e            nn_edge_mode,
  input  logic                  nn_border_sel,
  input  logic                  nn_dev_load,
  input  logic [NN_NB-1:0]     nn_dev_i,
  input  logic                  nn_arr_capture,
  output logic [NN_NB-1:0]     nn_border_q,
  output logic                  nn_some,
  output logic [NN_CW-1:0]     nn_count,
  // ---- CAAPP mesh of submeshes machine ----
  input  logic                  ca_uc_we,
  input  logic [UA_W-1:0]       ca_uc_addr,
  input  uentry_t               ca_uc_wdata,
  input  logic                  ca_cmd_valid,
  output logic                  ca_cmd_ready,
  input  logic [UA_W-1:0]       ca_cmd_start,
  input  logic [UA_W-1:0]       ca_cmd_loop,
  input  logic [P_W-1:0]        ca_cmd_passes,
  input  logic [MAX_P-1:0]      ca_cmd_pattern,
  output logic                  ca_busy,
  input  edge_mode_e            ca_edge_mode,
  input  logic                  ca_border_sel,
  input  logic                  ca_dev_load,
  input  logic [CA_NB-1:0]     ca_dev_i,
  input  logic                  ca_arr_capture,
  output logic [CA_NB-1:0]     ca_border_q,
  output logic                  ca_some,
  output logic [CA_CW-1:0]     ca_count,
  // ---- pyramid machine ----
  input  logic                  py_uc_we,
  input  logic [UA_W-1:0]       py_uc_addr,
  input  uentry_t               py_uc_wdata,
  input  logic                  py_cmd_valid,
  output logic                  py_cmd_ready,
  input  logic [UA_W-1:0]       py_cmd_start,
  input  logic [UA_W-1:0]       py_cmd_loop,
  input  logic [P_W-1:0]        py_cmd_passes,
  input  logic [MAX_P-1:0]      py_cmd_pattern,
  output logic                  py_busy,
  input  edge_mode_e            py_edge_mode,
  input  logic                  py_border_sel,
  input  logic                  py_dev_load,
  input  logic [PY_NB-1:0]     py_dev_i,
  input  logic                  py_arr_capture,
  output logic [PY_NB-1:0]     py_border_q,
  output logic                  py_some,
  output logic [PY_CW-1:0]     py_count,
  input  logic                  py_parent_i,
  output logic                  py_root_o
);

  // 4NN mesh machine: controller and array
  uinstr_t nn_ui;
  logic    nn_bc;

  array_controller #(.UC_DEPTH(UC_DEPTH), .MAX_P(MAX_P)) u_nn_ctrl (
    .clk, .rst, .uc_we(nn_uc_we), .uc_addr(nn_uc_addr), .uc_wdata(nn_uc_wdata),
    .cmd_valid(nn_cmd_valid), .cmd_ready(nn_cmd_ready), .cmd_start(nn_cmd_start),
    .cmd_loop(nn_cmd_loop), .cmd_passes(nn_cmd_passes), .cmd_pattern(nn_cmd_pattern),
    .ui_o(nn_ui), .bc_o(nn_bc), .busy_o(nn_busy)
  );

  flat_array #(.NET(NET_4NN), .ROWS(ROWS), .COLS(COLS), .MEM_BITS(MEM_BITS)) u_nn_array (
    .clk, .rst, .ui(nn_ui), .bc(nn_bc), .edge_mode(nn_edge_mode),
    .border_sel(nn_border_sel), .dev_load(nn_dev_load), .dev_i(nn_dev_i),
    .arr_capture(nn_arr_capture), .border_q(nn_border_q),
    .some_o(nn_some), .count_o(nn_count)
  );

  // CAAPP mesh of submeshes machine: controller and array
  uinstr_t ca_ui;
  logic    ca_bc;

  array_controller #(.UC_DEPTH(UC_DEPTH), .MAX_P(MAX_P)) u_ca_ctrl (
    .clk, .rst, .uc_we(ca_uc_we), .uc_addr(ca_uc_addr), .uc_wdata(ca_uc_wdata),
    .cmd_valid(ca_cmd_valid), .cmd_ready(ca_cmd_ready), .cmd_start(ca_cmd_start),
    .cmd_loop(ca_cmd_loop), .cmd_passes(ca_cmd_passes), .cmd_pattern(ca_cmd_pattern),
    .ui_o(ca_ui), .bc_o(ca_bc), .busy_o(ca_busy)
  );

  flat_array #(.NET(NET_CAAPP), .ROWS(ROWS), .COLS(COLS), .MEM_BITS(MEM_BITS)) u_ca_array (
    .clk, .rst, .ui(ca_ui), .bc(ca_bc), .edge_mode(ca_edge_mode),
    .border_sel(ca_border_sel), .dev_load(ca_dev_load), .dev_i(ca_dev_i),
    .arr_capture(ca_arr_capture), .border_q(ca_border_q),
    .some_o(ca_some), .count_o(ca_count)
  );

  // pyramid machine: controller and array
  uinstr_t py_ui;
  logic    py_bc;

  array_controller #(.UC_DEPTH(UC_DEPTH), .MAX_P(MAX_P)) u_py_ctrl (
    .clk, .rst, .uc_we(py_uc_we), .uc_addr(py_uc_addr), .uc_wdata(py_uc_wdata),
    .cmd_valid(py_cmd_valid), .cmd_ready(py_cmd_ready), .cmd_start(py_cmd_start),
    .cmd_loop(py_cmd_loop), .cmd_passes(py_cmd_passes), .cmd_pattern(py_cmd_pattern),
    .ui_o(py_ui), .bc_o(py_bc), .busy_o(py_busy)
  );

  pyramid_array #(.LEVELS(LEVELS), .MEM_BITS(MEM_BITS)) u_py_array (
    .clk, .rst, .ui(py_ui), .bc(py_bc), .edge_mode(py_edge_mode),
    .border_sel(py_border_sel), .dev_load(py_dev_load), .dev_i(py_dev_i),
    .arr_capture(py_arr_capture),
    .parent_i(py_parent_i), .root_o(py_root_o), .border_q(py_border_q),
    .some_o(py_some), .count_o(py_count)
  );

endmodule
