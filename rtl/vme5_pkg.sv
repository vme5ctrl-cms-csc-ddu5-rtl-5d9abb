// vme5_pkg: types and constants shared by the DDU5 VME controller.
//
// VME addresses are 24 bits wide. Bits [23:19] select the slot, [18:16] the
// access type, [15:12] the device and [11:2] a 10-bit command field. The
// three access types, the broadcast slot number and the FMM output codes are
// those of the DDU5 VME controller; the request/response structs are this
// design's internal bus between the VME slave and its function units.
package vme5_pkg;

  // Access type, VME address bits [18:16].
  typedef enum logic [2:0] {
    TYP_JTAG     = 3'b000,
    TYP_PARALLEL = 3'b011,
    TYP_SERIAL   = 3'b100
  } vme_typ_e;

  // Slot number that every DDU answers for writes.
  localparam logic [4:0] DDU_BROADCAST_SLOT = 5'd28;

  // One VME cycle as seen by a function unit. strobe stays high from the
  // start of the cycle until the unit's dtack has been seen and the master
  // has released its data strobe.
  typedef struct packed {
    logic        strobe;
    logic        write;
    logic [3:0]  dev;
    logic [9:0]  cmd;     // address bits [11:2]
    logic [15:0] wdata;
  } vme_req_t;

  typedef struct packed {
    logic        dtack;   // level: high when the unit has finished the cycle
    logic [15:0] rdata;
  } vme_rsp_t;

  // Per-board status lines (STATx): bit 0 busy, 1 warning/near full,
  // 2 lost sync, 3 error.
  localparam int STAT_BUSY  = 0;
  localparam int STAT_WARN  = 1;
  localparam int STAT_LSYNC = 2;
  localparam int STAT_ERROR = 3;

  // 4-bit FMM output codes.
  localparam logic [3:0] FMM_WARN  = 4'b0001;
  localparam logic [3:0] FMM_LSYNC = 4'b0010;
  localparam logic [3:0] FMM_BUSY  = 4'b0100;
  localparam logic [3:0] FMM_READY = 4'b1000;
  localparam logic [3:0] FMM_ERROR = 4'b1100;

  // Flash (serial DataFlash) opcodes. Status read is 0xD7; the page read and
  // page program opcodes are those of the AT45DB family.
  localparam logic [7:0] FL_OP_STATUS  = 8'hD7;
  localparam logic [7:0] FL_OP_PROGRAM = 8'h82;
  localparam logic [7:0] FL_OP_READ    = 8'hD2;

endpackage
