// superio_pkg: types and constants shared by the Super IO register-bus design.
//
// The design is a host-controlled I/O board. A host talks to the board over a
// UART (or I2C); a bus master turns each host command into one access on an
// 8-bit internal register bus. The register bus address is split into a 5-bit
// slot index (addr[7:3]) and a 3-bit register number (addr[2:0]); each slot is
// an 8-register file shared between the host bus and one peripheral module.
//
// Two request/response pairs are defined:
//   bus_req_t / bus_rsp_t : host bus master <-> register controllers
//   mod_req_t / mod_rsp_t : peripheral module <-> its register controller
// The printed design uses shared tristate buses for both; here every bus is
// split into a request and a response direction and the responses of the
// slots are OR-ed together by the top (an inactive slot drives zeros).
package superio_pkg;

  // Host bus: one access per go pulse.
  typedef struct packed {
    logic       go;     // one-cycle request strobe
    logic       write;  // 1 = write wdata to addr, 0 = read addr
    logic [7:0] addr;   // {slot index, register number}
    logic [7:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic       busy;   // a slot is serving its module (bus writes are held off)
    logic       rvalid; // one-cycle strobe: rdata holds the read result
    logic [7:0] rdata;
  } bus_rsp_t;

  // Module side of a register controller: request held until ack.
  typedef struct packed {
    logic       enable; // request pending
    logic       write;  // 1 = write wdata into the register file
    logic [2:0] addr;
    logic [7:0] wdata;
  } mod_req_t;

  typedef struct packed {
    logic       busy;   // the host bus is accessing this slot
    logic       ack;    // one-cycle strobe: request served, rdata valid for reads
    logic [7:0] rdata;
  } mod_rsp_t;

  localparam bus_rsp_t BUS_RSP_IDLE = '{busy: 1'b0, rvalid: 1'b0, rdata: 8'h00};

  // Serial command byte: 0100001 followed by the write flag.
  localparam logic [6:0] CMD_PREFIX = 7'b0100001;
  localparam logic [7:0] CMD_READ   = {CMD_PREFIX, 1'b0};  // 0x42
  localparam logic [7:0] CMD_WRITE  = {CMD_PREFIX, 1'b1};  // 0x43

  // Read-only information registers answered by the bus master itself.
  localparam logic [7:0] INFO_ADDR_VERSION_MAJOR = 8'd248;
  localparam logic [7:0] INFO_ADDR_VERSION_MINOR = 8'd249;
  localparam logic [7:0] INFO_ADDR_BUILD_DAY     = 8'd250;
  localparam logic [7:0] INFO_ADDR_BUILD_MONTH   = 8'd251;
  localparam logic [7:0] INFO_ADDR_BUILD_YEAR    = 8'd252;

  // Slot indices used by the board top.
  localparam int unsigned SLOT_MOTOR0 = 0;
  localparam int unsigned SLOT_MOTOR1 = 1;
  localparam int unsigned SLOT_DIGIN0 = 2;
  localparam int unsigned SLOT_LCD = 3;
  localparam int unsigned SLOT_SERVO0 = 4;
  localparam int unsigned SLOT_ENC0 = 5;
  localparam int unsigned SLOT_ENC1 = 6;
  localparam int unsigned SLOT_ANALOG0 = 7;
  localparam int unsigned SLOT_DIGOUT0 = 8;

  localparam int unsigned NUM_SLOTS = 9;

  function automatic logic [7:0] reg_addr(input logic [4:0] slot, input logic [2:0] r);
    return {slot, r};
  endfunction

endpackage
