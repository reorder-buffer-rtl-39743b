// rt_pkg: widths and types shared by the ray traversal unit.
//
// A ray travelling through the unit carries an identifier, a count of the
// nodes it has visited and its payload (origin and direction). The buffer
// keeps, next to each ray, the 26-bit address of the node data it needs next;
// that address width is the one the reorder-buffer extension is specified
// with. The other widths are this design's own choices: a 16-bit ray id,
// six single-precision floats of payload and 64-bit node records.
//
// Node record layout (this design's own convention, used by the pipeline):
//   [ADDR_W-1:0]  address of the next node to visit
//   [ADDR_W]      terminal flag: the ray has finished after this node
//   [DATA_W-1:ADDR_W+1] node contents, passed to the pipeline logic
package rt_pkg;

  localparam int unsigned ADDR_W    = 26;   // node address width
  localparam int unsigned RID_W     = 16;   // ray identifier width
  localparam int unsigned VISIT_W   = 8;    // visited-node counter width
  localparam int unsigned PAYLOAD_W = 192;  // org.xyz + dir.xyz, 6 x fp32
  localparam int unsigned DATA_W    = 64;   // one node record

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] node_t;

  typedef struct packed {
    logic [RID_W-1:0]     rid;
    logic [VISIT_W-1:0]   visits;
    logic [PAYLOAD_W-1:0] payload;
  } ray_t;

  // A ray together with the address of the node data it needs. In the
  // buffer each such entry also has a valid and a ready bit:
  //   valid=1           : new ray, has not yet accessed the cache
  //   valid=0, ready=0  : missed, waiting for the miss to complete
  //   valid=0, ready=1  : miss complete, data in cache, ray may go
  typedef struct packed {
    ray_t  ray;
    addr_t addr;
  } ray_req_t;

  // Fields of a node record.
  function automatic addr_t node_next(node_t n);
    return n[ADDR_W-1:0];
  endfunction

  function automatic logic node_last(node_t n);
    return n[ADDR_W];
  endfunction

endpackage
