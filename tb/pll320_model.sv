// pll320_model: behavioural model (not synthesizable) of the PLL under test, for simulation.
//
// From the 40 MHz reference on CLKA it makes GLA = 2x CLKA, GLB = 8x CLKA at 0 degrees and
// GLC = 8x CLKA at 90 degrees of the fast clock, all delayed by DELAY_PS after each rising
// edge of CLKA. Every rising edge of CLKA starts one reference period of output edges, so
// the outputs follow CLKA. POWERDOWN is active low: while it is low the outputs stay low and
// LOCK is low; LOCK rises after LOCK_CYCLES reference edges with POWERDOWN high. LOCK is
// high for the first picosecond of simulation, so that everything it resets sees a falling
// edge, as an FPGA's power-on clear would give.
// stop_glb is a test input, not a pin of the real PLL: it stops GLB alone, as a failed
// output would, while LOCK stays high.
//
// Times are in picoseconds. T_REF_PS must be divisible by 32.
module pll320_model #(
  parameter int unsigned T_REF_PS    = 25600,
  parameter int unsigned DELAY_PS    = 100,
  parameter int unsigned LOCK_CYCLES = 4
) (
  input  logic CLKA,
  input  logic POWERDOWN,
  input  logic stop_glb,
  output logic GLA,
  output logic GLB,
  output logic GLC,
  output logic LOCK
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned H8 = T_REF_PS / 16;  // half period of the 8x clock
  localparam int unsigned H2 = T_REF_PS / 4;   // half period of the 2x clock
  localparam int unsigned Q8 = T_REF_PS / 32;  // 90 degrees of the 8x clock

  int unsigned lock_cnt = 0;

  // LOCK starts high for 1 ps so that registers reset by it see a falling edge at start-up
  initial begin
    GLA = 1'b0; GLB = 1'b0; GLC = 1'b0; LOCK = 1'b1;
    #1 LOCK = 1'b0;
  end

  always @(posedge CLKA or negedge POWERDOWN) begin
    if (!POWERDOWN) begin
      lock_cnt = 0;
      LOCK     = 1'b0;
    end else begin
      if (lock_cnt < LOCK_CYCLES) lock_cnt++;
      else                        LOCK = 1'b1;
      fork
        begin : burst_b
          #(DELAY_PS);
          for (int k = 0; k < 8; k++) begin
            if (POWERDOWN && !stop_glb) GLB = 1'b1;
            #(H8) GLB = 1'b0;
            if (k < 7) #(H8);
          end
        end
        begin : burst_c
          #(DELAY_PS + Q8);
          for (int k = 0; k < 8; k++) begin
            if (POWERDOWN) GLC = 1'b1;
            #(H8) GLC = 1'b0;
            if (k < 7) #(H8);
          end
        end
        begin : burst_a
          #(DELAY_PS);
          for (int k = 0; k < 2; k++) begin
            if (POWERDOWN) GLA = 1'b1;
            #(H2) GLA = 1'b0;
            if (k < 1) #(H2);
          end
        end
      join_none
    end
  end

endmodule
