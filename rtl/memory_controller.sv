// memory_controller - sequencing of the multiple-access table look-up.
//
// Evaluates d(n) = d(n-1) + a*e(n) + b*e(n-1) + c*e(n-2) with two table reads
// instead of one 2^20-word table, in the three stages of the published timing:
//   (i)   edge where `start` is high: the delay element takes e(n) and shifts
//         e(n-1), e(n-2); here d(n-1) is latched from the d(n) register.
//   (ii)  next edge: Memory-A is read at {e(n), e(n-1), e(n-2)} -> code e'(n).
//   (iii) next edge: Memory-B is read at {e'(n), d(n-1)} -> d(n);
//         `d_valid` is high for the cycle after.
// The d(n) register (Memory-B's read register) is the "Delay" that feeds
// d(n-1) back. Its reset value D_INIT is this design's choice. Table writes
// (`tbl_we`, `tbl_sel` 0 = Memory-A, 1 = Memory-B) go straight to the RAMs;
// Memory-A uses the low 12 address bits and the low CODE_W data bits.
module memory_controller
  import pwm_pkg::*;
#(
  parameter duty_t D_INIT = duty_t'(D_MIN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,      // stage (i)
  input  err_triple_t     err,        // from the delay element, valid after (i)
  output duty_t           d,          // d(n)
  output logic            d_valid,    // d(n) has just been updated
  input  logic            tbl_we,
  input  logic            tbl_sel,
  input  logic [B_AW-1:0] tbl_addr,
  input  duty_t           tbl_wdata
);
  timeunit 1ns; timeprecision 1ps;

  logic  st_ii, st_iii;   // stage (ii) / (iii) happens at the next edge
  duty_t d_prev;          // latched d(n-1)
  code_t ep_code;         // e'(n) code from Memory-A

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st_ii   <= 1'b0;
      st_iii  <= 1'b0;
      d_valid <= 1'b0;
      d_prev  <= D_INIT;
    end else begin
      st_ii   <= start;
      st_iii  <= st_ii;
      d_valid <= st_iii;
      if (start) d_prev <= d;
    end

  memory_a u_mem_a (
    .clk   (clk),
    .re    (st_ii),
    .addr  (err),
    .code  (ep_code),
    .we    (tbl_we && !tbl_sel),
    .waddr (tbl_addr[A_AW-1:0]),
    .wdata (tbl_wdata[CODE_W-1:0])
  );

  memory_b #(.D_INIT(D_INIT)) u_mem_b (
    .clk    (clk),
    .rst_n  (rst_n),
    .re     (st_iii),
    .code   (ep_code),
    .d_prev (d_prev),
    .d      (d),
    .we     (tbl_we && tbl_sel),
    .waddr  (tbl_addr),
    .wdata  (tbl_wdata)
  );

  // A new look-up may only start once the previous one has finished.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !st_ii && !st_iii);
endmodule
