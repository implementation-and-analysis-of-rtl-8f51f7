// Shared types and constants of the stereo-vision system.
//
// Every peripheral reaches external memory through a simple byte-wide
// request/response port (mem_req_t / mem_rsp_t): a request is taken in a
// cycle where req.valid and rsp.ready are both high; a read returns its byte
// some cycles later with rsp.rvalid, in the order the reads were issued.
// Writes return nothing. This port stands in for the AXI4 master that each
// peripheral uses towards DDR in the original system; the byte width and the
// in-order handshake are this design's own choice.
package sgm_pkg;

  localparam int unsigned ADDR_W = 32;  // byte address width

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [7:0]        wdata;
  } mem_req_t;

  typedef struct packed {
    logic       ready;   // request accepted this cycle
    logic       rvalid;  // read data returned this cycle
    logic [7:0] rdata;
  } mem_rsp_t;

endpackage
