// reg_controller8: one slot of the register bus, an 8 x 8-bit register file
// shared between the host bus and one peripheral module.
//
// The slot answers host accesses whose address has addr[7:3] == index; the
// register is addr[2:0]. The module side addresses the same eight registers
// directly. The file is the meeting point of the two: the host writes
// settings that the module fetches, and the module writes measurements that
// the host reads.
//
// A small FSM serves one access at a time. In IDLE a host access has priority
// over a module request. A host go that arrives while the slot is serving the
// module is latched and served right after. Timing:
//   host read   : READB one clock, bus_rsp.rvalid with the data
//   host write  : WRITEB one clock, the register is written
//   module read : READM one clock, mod_rsp.ack with the data
//   module write: WRITEM one clock, the register is written, mod_rsp.ack
// mod_rsp.busy is high during READB/WRITEB; its falling edge tells the module
// that the host has just touched the slot, which is when modules re-read their
// settings. bus_rsp.busy is high during READM.
// A module request is held (mod_req.enable) until ack.
//
// The register file, slot decode, bus-over-module priority and the meaning of
// the two busy signals follow the printed design; the latched host request and
// the ack strobe replace its fixed four-clock windows on tristate buses.
module reg_controller8
  import superio_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] index,
  // host bus
  input  bus_req_t   bus_req,
  output bus_rsp_t   bus_rsp,
  // module
  input  mod_req_t   mod_req,
  output mod_rsp_t   mod_rsp,
  // register contents, for observation
  output logic [7:0] regs [8]
);
  typedef enum logic [2:0] {IDLE, READB, WRITEB, READM, WRITEM} state_t;
  state_t state;

  logic       hit;
  logic       pend;
  logic       pend_write;
  logic [2:0] pend_addr;
  logic [7:0] pend_wdata;
  logic [2:0] cur_addr;
  logic [7:0] cur_wdata;
  logic [7:0] dout;

  assign hit = bus_req.go && (bus_req.addr[7:3] == index);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      pend       <= 1'b0;
      pend_write <= 1'b0;
      pend_addr  <= '0;
      pend_wdata <= '0;
      cur_addr   <= '0;
      cur_wdata  <= '0;
      dout       <= '0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      if (hit) begin
        pend       <= 1'b1;
        pend_write <= bus_req.write;
        pend_addr  <= bus_req.addr[2:0];
        pend_wdata <= bus_req.wdata;
      end
      case (state)
        IDLE: begin
          if (hit || pend) begin
            // serve the newest host request
            logic       w;
            logic [2:0] a;
            w = hit ? bus_req.write      : pend_write;
            a = hit ? bus_req.addr[2:0]  : pend_addr;
            cur_addr  <= a;
            cur_wdata <= hit ? bus_req.wdata : pend_wdata;
            dout      <= regs[a];
            pend      <= 1'b0;
            state     <= w ? WRITEB : READB;
          end else if (mod_req.enable) begin
            cur_addr  <= mod_req.addr;
            cur_wdata <= mod_req.wdata;
            dout      <= regs[mod_req.addr];
            state     <= mod_req.write ? WRITEM : READM;
          end
        end
        WRITEB, WRITEM: begin
          regs[cur_addr] <= cur_wdata;
          state          <= IDLE;
        end
        READB, READM: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    bus_rsp.busy   = (state == READM);
    bus_rsp.rvalid = (state == READB);
    bus_rsp.rdata  = (state == READB) ? dout : 8'h00;
    mod_rsp.busy   = (state == READB) || (state == WRITEB);
    mod_rsp.ack    = (state == READM) || (state == WRITEM);
    mod_rsp.rdata  = (state == READM) ? dout : 8'h00;
  end

  // A module request, once raised, stays up until it is acknowledged.
  assert property (@(posedge clk) disable iff (rst)
                   mod_req.enable && !mod_rsp.ack |=> mod_req.enable || mod_rsp.ack);

endmodule
