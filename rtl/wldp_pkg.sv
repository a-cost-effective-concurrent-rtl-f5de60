// wldp_pkg -- shared types of the watchdog processor with loop detection and
// prediction (WLDP).
//
// The watchdog executes a reference program of "nodes". Every node carries
// three fields: a 3-bit node type, the reference address (the main-processor
// address at which the node is checked) and an offset from the node's own
// watchdog-memory address to its branch target. The eight node-type codes are
// the ones the scheme defines; the error codes are this design's own encoding
// of the causes the error handler can report.
package wldp_pkg;

  // Node type codes (3 bits).
  typedef enum logic [2:0] {
    NT_START = 3'b000,  // entry point of the control flow graph
    NT_PROC  = 3'b001,  // proceeding node, sequential successor
    NT_UBB   = 3'b010,  // unconditional backward branch (loop tail)
    NT_UFB   = 3'b011,  // unconditional forward branch
    NT_CBB   = 3'b100,  // conditional backward branch (loop tail)
    NT_CFB   = 3'b101,  // conditional forward branch
    NT_CALL  = 3'b110,  // subroutine call
    NT_RET   = 3'b111   // return from subroutine
  } node_type_e;

  // Cause of a detected control flow error.
  typedef enum logic [2:0] {
    ERR_NONE     = 3'd0,
    ERR_BREAK    = 3'd1,  // address break to an address that is no expected node
    ERR_BRANCH   = 3'd2,  // instruction after a branch node is not its target
    ERR_STK_OVF  = 3'd3,  // call nesting deeper than the return stack
    ERR_STK_UNF  = 3'd4,  // return with an empty return stack
    ERR_QUEUE    = 3'd5   // retire events arrived faster than they were checked
  } err_e;

  // True for the two backward-branch (loop tail) node types.
  function automatic logic is_backward(node_type_e t);
    return (t == NT_UBB) || (t == NT_CBB);
  endfunction

endpackage
