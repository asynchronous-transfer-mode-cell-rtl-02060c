// tb_atm_ref_delineator: cycle-accurate reference model of one cell
// delineator for the testbenches, written from the hunting rules rather than
// from the RTL's structure. It keeps the last 40 received bits, divides them
// by the generator with the long-division reference when a check is due, and
// counts units in the current state: in HUNT a check is due in every clock
// once 40 bits have arrived since HUNT began, in PRESYNC and SYNC once per
// cell. It predicts the state, the delayed data and the correct-cell marker,
// and counts the events of the state diagram.
module tb_atm_ref_delineator
  import tb_atm_pkg::*;
#(
  parameter int unsigned W     = 1,
  parameter int unsigned ALPHA = 7,
  parameter int unsigned DELTA = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] data_in,
  output logic [1:0]   exp_state,
  output logic [W-1:0] exp_data_out,
  output logic         exp_cco,
  output int           ev_found,       // HUNT -> PRESYNC
  output int           ev_presync_bad, // PRESYNC -> HUNT
  output int           ev_sync,        // PRESYNC -> SYNC
  output int           ev_sync_bad,    // incorrect HEC tolerated in SYNC
  output int           ev_lost,        // SYNC -> HUNT
  output int           ev_cell_ok      // correct cell in SYNC
);

  localparam int HDR  = 40 / W;
  localparam int CELL = 424 / W;

  int st, n, good, bad;
  logic [39:0] hist;

  always @(posedge clk) begin
    logic [39:0] h;
    int nxt, n1;
    logic ok, cco;
    if (reset) begin
      st = 0; n = 0; good = 0; bad = 0; hist = '0;
      exp_state <= 2'd0; exp_data_out <= '0; exp_cco <= 1'b0;
      ev_found <= 0; ev_presync_bad <= 0; ev_sync <= 0;
      ev_sync_bad <= 0; ev_lost <= 0; ev_cell_ok <= 0;
    end else begin
      h   = (hist << W) | 40'(data_in);
      ok  = (ref_syndrome(h) == 8'h00);
      n1  = n + 1;
      nxt = st;
      cco = 1'b0;
      case (st)
        0: if (n1 >= HDR && ok) begin nxt = 1; ev_found <= ev_found + 1; end
        1: if (n1 % CELL == 0) begin
             if (!ok) begin nxt = 0; ev_presync_bad <= ev_presync_bad + 1; end
             else begin
               good++;
               if (good == DELTA) begin nxt = 2; ev_sync <= ev_sync + 1; end
             end
           end
        default: if (n1 % CELL == 0) begin
             if (ok) begin bad = 0; cco = 1'b1; ev_cell_ok <= ev_cell_ok + 1; end
             else begin
               bad++;
               if (bad == ALPHA) begin nxt = 0; ev_lost <= ev_lost + 1; end
               else ev_sync_bad <= ev_sync_bad + 1;
             end
           end
      endcase
      if (nxt != st) begin n = 0; good = 0; bad = 0; end
      else n = n1;
      st = nxt;
      hist = h;
      exp_state    <= 2'(st);
      exp_data_out <= data_in;
      exp_cco      <= cco;
    end
  end

endmodule
