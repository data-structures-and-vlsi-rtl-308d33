// ds_pkg: operation codes shared by the data-structure blocks.
//
// Every block of this collection is a hardware "abstract data type": a
// memory plus a small controller that executes one operation per request.
// The operation sets below are those of the data types (array, record,
// linked list, list, stack, queue, table, tree, set, graph) and of the
// content addressable memory. Encodings are this design's own choice.
package ds_pkg;

  // array_1d and record_store
  typedef enum logic {ARR_UPDATE, ARR_RETRIEVE} array_op_e;

  // content addressable memory
  typedef enum logic [2:0] {
    CAM_RESET, CAM_MATCH, CAM_WRFIRST, CAM_WRALL, CAM_RDADDR, CAM_WRADDR
  } cam_op_e;

  // linked_list (LL_NXT is the NEXT query)
  typedef enum logic [2:0] {
    LL_CLEAR, LL_INSERT, LL_RETRIEVE, LL_DELETE, LL_NXT
  } ll_op_e;

  // list_store (L_END returns the first empty position)
  typedef enum logic [2:0] {
    L_CLEAR, L_INSERT, L_RETRIEVE, L_DELETE, L_LOCATE, L_END
  } list_op_e;

  typedef enum logic [1:0] {S_CLEAR, S_PUSH, S_POP, S_TOP} stack_op_e;

  typedef enum logic [1:0] {Q_CLEAR, Q_ENQUEUE, Q_DEQUEUE, Q_FRONT} queue_op_e;

  typedef enum logic [2:0] {
    T_CLEAR, T_INSERT, T_DELETE, T_RETRIEVE, T_MEMBER
  } table_op_e;

  typedef enum logic [2:0] {
    TR_CLEAR, TR_PARENT, TR_LEFT_CHILD, TR_RIGHT_SIBLING,
    TR_LABEL, TR_CREATE, TR_ROOT, TR_RESET
  } tree_op_e;

  typedef enum logic [3:0] {
    SET_CLEAR, SET_UNION, SET_INTERSECTION, SET_DIFFERENCE, SET_MEMBER,
    SET_INSERT, SET_DELETE, SET_ASSIGN, SET_EQUAL, SET_MIN, SET_MAX
  } set_op_e;

  typedef enum logic [2:0] {
    G_CLEAR, G_INS_NODE, G_INS_EDGE, G_DEL_NODE, G_DEL_EDGE,
    G_RETR_NODE, G_RETR_EDGE
  } graph_op_e;

endpackage
