// tb_atm_checker: compares one delineator with the reference model in every
// clock (state, delayed data, correct-cell marker) and passes on the model's
// event counts, so that a testbench can require each mechanism of the state
// diagram to have happened.
module tb_atm_checker #(
  parameter int unsigned W     = 1,
  parameter int unsigned ALPHA = 7,
  parameter int unsigned DELTA = 8,
  parameter string       NAME  = "dut"
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] data_in,
  input  logic [1:0]   dut_state,
  input  logic [W-1:0] dut_data_out,
  input  logic         dut_cco,
  output int           checks,
  output int           failures,
  output int           ev_found,
  output int           ev_presync_bad,
  output int           ev_sync,
  output int           ev_sync_bad,
  output int           ev_lost,
  output int           ev_cell_ok,
  output int           first_sync_clk    // clock count when SYNC was first entered, -1 if never
);

  logic [1:0]   exp_state;
  logic [W-1:0] exp_data_out;
  logic         exp_cco;
  int           clk_count;

  tb_atm_ref_delineator #(.W(W), .ALPHA(ALPHA), .DELTA(DELTA)) u_ref (
    .clk, .reset, .data_in, .exp_state, .exp_data_out, .exp_cco,
    .ev_found, .ev_presync_bad, .ev_sync, .ev_sync_bad, .ev_lost, .ev_cell_ok
  );

  initial begin
    checks = 0; failures = 0; clk_count = 0; first_sync_clk = -1;
  end

  always @(negedge clk) begin
    if (!reset) begin
      clk_count++;
      checks += 3;
      if (dut_state !== exp_state || dut_data_out !== exp_data_out || dut_cco !== exp_cco) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s clk %0d: state %0d/%0d data_out %0h/%0h cco %0b/%0b", NAME, clk_count,
                   dut_state, exp_state, dut_data_out, exp_data_out, dut_cco, exp_cco);
      end
      if (first_sync_clk < 0 && exp_state == 2'd2) first_sync_clk = clk_count;
    end
  end

endmodule
