// power_mgr: power manager. Switches each functional block on only in the
// phases that use it, and puts the whole receiver in stand-by on request.
//
//   phase       fe  integ adc presync sync demod ranging decoder
//   ST_IDLE      0    0    0     0      0    0      0       0
//   ST_PRESYNC   1    1    1     1      0    0      0       0
//   ST_SYNC      1    1    1     0      1    0      0       0
//   ST_DEMOD     1    1    1     0      0    1      1       1
// `standby` (from the MAC) forces every enable low. The enables are
// registered, so they follow a phase change one clock later. Activating and
// deactivating blocks is the published function of the power manager; this
// table and the stand-by input are this design's own.
module power_mgr
  import uwb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rx_state_e state,     // phase from the system controller
  input  logic      standby,   // stand-by request
  output pwr_en_t   pwr_en     // per-block enables
);
  pwr_en_t en_n;

  always_comb begin
    en_n = '0;
    if (!standby) begin
      unique case (state)
        ST_PRESYNC: begin
          en_n.fe = 1'b1; en_n.integ = 1'b1; en_n.adc = 1'b1;
          en_n.presync = 1'b1;
        end
        ST_SYNC: begin
          en_n.fe = 1'b1; en_n.integ = 1'b1; en_n.adc = 1'b1;
          en_n.sync = 1'b1;
        end
        ST_DEMOD: begin
          en_n.fe = 1'b1; en_n.integ = 1'b1; en_n.adc = 1'b1;
          en_n.demod = 1'b1; en_n.ranging = 1'b1; en_n.decoder = 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwr_en <= '0;
    else        pwr_en <= en_n;
  end
endmodule
