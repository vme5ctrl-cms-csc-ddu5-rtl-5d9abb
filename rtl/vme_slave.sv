// vme_slave: VME bus slave of the DDU VME controller (A24/D16).
//
// The address selects slot, access type and device:
//   [23:19] slot: the board's geographic address, or 28 (0x1C), the slot
//           number all DDUs answer for broadcast writes
//   [18:16] type: 000 VME-JTAG, 100 VME-Serial, 011 VME-Parallel
//   [15:12] device, [11:2] command
// VME-JTAG device 9 is the serial ADC port; devices 1-8 and 15 are JTAG
// chains. The cycle is handed to the one function unit it selects as a
// vme_req_t with strobe held high; the unit answers through a vme_rsp_t.
// Cycles to another slot, another type, an unused JTAG device or a
// broadcast read are not answered (the bus timer ends them).
//
// The data strobes and the address strobe are synchronised with two
// flip-flops. When a strobe arrives with the address strobe low, address,
// write line and data are latched and the unit's strobe goes high. When the
// unit's dtack rises, DTACK* is driven low and, for a read, the data bus is
// enabled with the unit's data; both end when the master releases its data
// strobes, which also drops the unit's strobe. Address-modifier codes are
// not checked. Assertions state the bus rules: DTACK* only inside a cycle,
// the data bus only with DTACK*. The slot and type fields follow the board; synchroniser,
// latching and the handling of unanswered cycles are this design's choices.
module vme_slave
  import vme5_pkg::*;
#(
  parameter logic [15:0] JTAG_DEVS = 16'h81FE,
  parameter logic [3:0]  ADC_DEV   = 4'd9
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  ga,
  input  logic [23:1] vme_a,
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  output vme_req_t    req_jtag,
  output vme_req_t    req_adc,
  output vme_req_t    req_ser,
  output vme_req_t    req_par,
  input  vme_rsp_t    rsp_jtag,
  input  vme_rsp_t    rsp_adc,
  input  vme_rsp_t    rsp_ser,
  input  vme_rsp_t    rsp_par
);
  typedef enum logic [2:0] {U_NONE, U_JTAG, U_ADC, U_SER, U_PAR} unit_e;

  logic [1:0] ds_sync, as_sync;
  logic       ds_act, as_act;
  logic       active;             // a cycle of ours is in progress
  unit_e      unit;
  vme_req_t   req;
  vme_rsp_t   rsp;
  logic       bcast;

  always_ff @(posedge clk) begin
    if (rst) begin
      ds_sync <= '0;
      as_sync <= '0;
    end else begin
      ds_sync <= {ds_sync[0], !(vme_ds_n[0] && vme_ds_n[1])};
      as_sync <= {as_sync[0], !vme_as_n};
    end
  end
  assign ds_act = ds_sync[1];
  assign as_act = as_sync[1];

  // Decode of the (stable) address when the strobe arrives.
  unit_e      dec_unit;
  logic       dec_bcast;
  logic [3:0] a_dev;
  logic [2:0] a_typ;
  assign a_dev = vme_a[15:12];
  assign a_typ = vme_a[18:16];
  always_comb begin
    dec_bcast = (vme_a[23:19] == DDU_BROADCAST_SLOT) && !vme_write_n;
    dec_unit  = U_NONE;
    if ((vme_a[23:19] == ga) || dec_bcast) begin
      unique case (a_typ)
        TYP_JTAG: begin
          if (a_dev == ADC_DEV)        dec_unit = U_ADC;
          else if (JTAG_DEVS[a_dev])   dec_unit = U_JTAG;
        end
        TYP_SERIAL:   dec_unit = U_SER;
        TYP_PARALLEL: dec_unit = U_PAR;
        default:      dec_unit = U_NONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active      <= 1'b0;
      unit        <= U_NONE;
      req         <= '0;
      bcast       <= 1'b0;
      vme_dtack_n <= 1'b1;
      vme_d_oe    <= 1'b0;
      vme_d_out   <= '0;
    end else begin
      if (!active) begin
        vme_dtack_n <= 1'b1;
        vme_d_oe    <= 1'b0;
        if (ds_act && as_act && dec_unit != U_NONE) begin
          active     <= 1'b1;
          unit       <= dec_unit;
          bcast      <= dec_bcast;
          req.strobe <= 1'b1;
          req.write  <= !vme_write_n;
          req.dev    <= a_dev;
          req.cmd    <= vme_a[11:2];
          req.wdata  <= vme_d_in;
        end
      end else begin
        if (!ds_act) begin
          // Master released the strobe: end the cycle once the unit has
          // seen strobe fall and dropped its dtack.
          req.strobe  <= 1'b0;
          vme_dtack_n <= 1'b1;
          vme_d_oe    <= 1'b0;
          if (!req.strobe && !rsp.dtack) begin
            active <= 1'b0;
            unit   <= U_NONE;
          end
        end else if (rsp.dtack && req.strobe) begin
          vme_dtack_n <= 1'b0;
          vme_d_out   <= rsp.rdata;
          vme_d_oe    <= !req.write && !bcast;
        end
      end
    end
  end

  always_comb begin
    unique case (unit)
      U_JTAG:  rsp = rsp_jtag;
      U_ADC:   rsp = rsp_adc;
      U_SER:   rsp = rsp_ser;
      U_PAR:   rsp = rsp_par;
      default: rsp = '0;
    endcase
  end

  always_comb begin
    req_jtag = '0;
    req_adc  = '0;
    req_ser  = '0;
    req_par  = '0;
    unique case (unit)
      U_JTAG:  req_jtag = req;
      U_ADC:   req_adc  = req;
      U_SER:   req_ser  = req;
      U_PAR:   req_par  = req;
      default: ;
    endcase
  end

  // Bus rules: DTACK* only inside a cycle, the data bus only together with
  // DTACK*, and the unit's strobe ends only once the master has let go.
  a_dtack_in_cycle: assert property (@(posedge clk) disable iff (rst)
    !vme_dtack_n |-> active);
  a_data_with_dtack: assert property (@(posedge clk) disable iff (rst)
    vme_d_oe |-> !vme_dtack_n);
  a_strobe_held: assert property (@(posedge clk) disable iff (rst)
    $fell(req.strobe) |-> !$past(ds_act));
endmodule
